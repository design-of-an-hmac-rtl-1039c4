// sha2_pkg: types, constants and word functions shared by the SHA-2 core and
// the HMAC unit.
//
// The datapath is one 64-bit word wide. SHA-384/512 use all 64 bits; SHA-224/256
// use the low 32 bits and keep the high half at zero, so every sum is reduced
// modulo 2^32 in those modes (word_mask). The rotation and shift amounts of the
// six logical functions are those of the Secure Hash Standard (FIPS 180-4).
//
// Constants: K_ROM holds the 80 SHA-384/512 round constants, the first 64 bits
// of the fractional parts of the cube roots of the first 80 primes. The
// SHA-224/256 constants are the high 32 bits of the first 64 entries. IV_512 and
// IV_384 are the first 64 bits of the fractional parts of the square roots of
// primes 1..8 and 9..16; SHA-256 takes the high and SHA-224 the low 32 bits of
// them respectively.
package sha2_pkg;

  localparam int unsigned DW = 64;           // datapath width D of the widest mode

  typedef logic [DW-1:0] word_t;
  typedef logic [7:0][DW-1:0] hash_t;         // [i] = H_i (or a..h, [0] = a)
  typedef logic [15:0][DW-1:0] block_t;       // [i] = M_i / W_i

  typedef enum logic [1:0] {
    SHA224 = 2'd0,
    SHA256 = 2'd1,
    SHA384 = 2'd2,
    SHA512 = 2'd3
  } sha2_mode_t;

  // Where the chaining value H (and a..h) comes from when a block starts.
  typedef enum logic [1:0] {
    H_IV   = 2'd0,   // initial hash values of the mode (new hash)
    H_KEEP = 2'd1,   // current H (next block of a multi-block message)
    H_EXT  = 2'd2    // stored value supplied by the HMAC unit
  } h_sel_t;

  localparam word_t K_ROM [80] = '{
    64'h428a2f98d728ae22,
    64'h7137449123ef65cd,
    64'hb5c0fbcfec4d3b2f,
    64'he9b5dba58189dbbc,
    64'h3956c25bf348b538,
    64'h59f111f1b605d019,
    64'h923f82a4af194f9b,
    64'hab1c5ed5da6d8118,
    64'hd807aa98a3030242,
    64'h12835b0145706fbe,
    64'h243185be4ee4b28c,
    64'h550c7dc3d5ffb4e2,
    64'h72be5d74f27b896f,
    64'h80deb1fe3b1696b1,
    64'h9bdc06a725c71235,
    64'hc19bf174cf692694,
    64'he49b69c19ef14ad2,
    64'hefbe4786384f25e3,
    64'h0fc19dc68b8cd5b5,
    64'h240ca1cc77ac9c65,
    64'h2de92c6f592b0275,
    64'h4a7484aa6ea6e483,
    64'h5cb0a9dcbd41fbd4,
    64'h76f988da831153b5,
    64'h983e5152ee66dfab,
    64'ha831c66d2db43210,
    64'hb00327c898fb213f,
    64'hbf597fc7beef0ee4,
    64'hc6e00bf33da88fc2,
    64'hd5a79147930aa725,
    64'h06ca6351e003826f,
    64'h142929670a0e6e70,
    64'h27b70a8546d22ffc,
    64'h2e1b21385c26c926,
    64'h4d2c6dfc5ac42aed,
    64'h53380d139d95b3df,
    64'h650a73548baf63de,
    64'h766a0abb3c77b2a8,
    64'h81c2c92e47edaee6,
    64'h92722c851482353b,
    64'ha2bfe8a14cf10364,
    64'ha81a664bbc423001,
    64'hc24b8b70d0f89791,
    64'hc76c51a30654be30,
    64'hd192e819d6ef5218,
    64'hd69906245565a910,
    64'hf40e35855771202a,
    64'h106aa07032bbd1b8,
    64'h19a4c116b8d2d0c8,
    64'h1e376c085141ab53,
    64'h2748774cdf8eeb99,
    64'h34b0bcb5e19b48a8,
    64'h391c0cb3c5c95a63,
    64'h4ed8aa4ae3418acb,
    64'h5b9cca4f7763e373,
    64'h682e6ff3d6b2b8a3,
    64'h748f82ee5defb2fc,
    64'h78a5636f43172f60,
    64'h84c87814a1f0ab72,
    64'h8cc702081a6439ec,
    64'h90befffa23631e28,
    64'ha4506cebde82bde9,
    64'hbef9a3f7b2c67915,
    64'hc67178f2e372532b,
    64'hca273eceea26619c,
    64'hd186b8c721c0c207,
    64'heada7dd6cde0eb1e,
    64'hf57d4f7fee6ed178,
    64'h06f067aa72176fba,
    64'h0a637dc5a2c898a6,
    64'h113f9804bef90dae,
    64'h1b710b35131c471b,
    64'h28db77f523047d84,
    64'h32caab7b40c72493,
    64'h3c9ebe0a15c9bebc,
    64'h431d67c49c100d4c,
    64'h4cc5d4becb3e42b6,
    64'h597f299cfc657e2a,
    64'h5fcb6fab3ad6faec,
    64'h6c44198c4a475817
  };
  localparam word_t IV_512 [8] = '{64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b, 64'ha54ff53a5f1d36f1, 64'h510e527fade682d1, 64'h9b05688c2b3e6c1f, 64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179};
  localparam word_t IV_384 [8] = '{64'hcbbb9d5dc1059ed8, 64'h629a292a367cd507, 64'h9159015a3070dd17, 64'h152fecd8f70e5939, 64'h67332667ffc00b31, 64'h8eb44a8768581511, 64'hdb0c2e0d64f98fa7, 64'h47b5481dbefa4fa4};

  function automatic logic is_wide(sha2_mode_t m);
    return m inside {SHA384, SHA512};
  endfunction

  // j: number of iterations (Table 2.2)
  function automatic logic [6:0] n_rounds(sha2_mode_t m);
    return is_wide(m) ? 7'd80 : 7'd64;
  endfunction

  // L/D: D-bit words in the message digest
  function automatic logic [3:0] digest_words(sha2_mode_t m);
    case (m)
      SHA224:  return 4'd7;
      SHA256:  return 4'd8;
      SHA384:  return 4'd6;
      default: return 4'd8;
    endcase
  endfunction

  // D/8: bytes per word
  function automatic logic [3:0] word_bytes(sha2_mode_t m);
    return is_wide(m) ? 4'd8 : 4'd4;
  endfunction

  // B: block size in bits
  function automatic logic [10:0] block_bits(sha2_mode_t m);
    return is_wide(m) ? 11'd1024 : 11'd512;
  endfunction

  // L: digest size in bits
  function automatic logic [9:0] digest_bits(sha2_mode_t m);
    case (m)
      SHA224:  return 10'd224;
      SHA256:  return 10'd256;
      SHA384:  return 10'd384;
      default: return 10'd512;
    endcase
  endfunction

  function automatic word_t word_mask(sha2_mode_t m, word_t x);
    return is_wide(m) ? x : {32'h0, x[31:0]};
  endfunction

  // Addition modulo 2^D
  function automatic word_t add_w(sha2_mode_t m, word_t x, word_t y);
    return word_mask(m, x + y);
  endfunction

  function automatic logic [31:0] rotr32(logic [31:0] x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic word_t rotr64(word_t x, int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic word_t big_sigma0(sha2_mode_t m, word_t x);
    if (is_wide(m)) return rotr64(x, 28) ^ rotr64(x, 34) ^ rotr64(x, 39);
    return {32'h0, rotr32(x[31:0], 2) ^ rotr32(x[31:0], 13) ^ rotr32(x[31:0], 22)};
  endfunction

  function automatic word_t big_sigma1(sha2_mode_t m, word_t x);
    if (is_wide(m)) return rotr64(x, 14) ^ rotr64(x, 18) ^ rotr64(x, 41);
    return {32'h0, rotr32(x[31:0], 6) ^ rotr32(x[31:0], 11) ^ rotr32(x[31:0], 25)};
  endfunction

  function automatic word_t small_sigma0(sha2_mode_t m, word_t x);
    if (is_wide(m)) return rotr64(x, 1) ^ rotr64(x, 8) ^ (x >> 7);
    return {32'h0, rotr32(x[31:0], 7) ^ rotr32(x[31:0], 18) ^ (x[31:0] >> 3)};
  endfunction

  function automatic word_t small_sigma1(sha2_mode_t m, word_t x);
    if (is_wide(m)) return rotr64(x, 19) ^ rotr64(x, 61) ^ (x >> 6);
    return {32'h0, rotr32(x[31:0], 17) ^ rotr32(x[31:0], 19) ^ (x[31:0] >> 10)};
  endfunction

  function automatic word_t ch(word_t x, word_t y, word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(word_t x, word_t y, word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

  // ---------------------------------------------------------------- HMAC
  typedef enum logic {
    OP_HASH = 1'b0,   // plain message digest of the Key_Text_In stream
    OP_HMAC = 1'b1    // MAC: key stream (unless reused), then text stream
  } hmac_op_t;

  typedef struct packed {
    hmac_op_t   op;
    sha2_mode_t mode;
    logic       key_reuse;   // use the stored K0_Ipad_Hash / K0_Opad_Hash
    logic [15:0] key_bytes;  // key size K in bytes (no key stream when reused)
  } hmac_cmd_t;

  // Byte-repeated pad word for the mode: 0x36.. (ipad) or 0x5c.. (opad)
  function automatic word_t pad_word(sha2_mode_t m, logic [7:0] b);
    return word_mask(m, {8{b}});
  endfunction

endpackage
