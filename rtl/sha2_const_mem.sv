// sha2_const_mem: the constants memory of the SHA-2 core.
//
// A read-only table addressed by the iteration counter t. It returns the round
// constant K_t of the selected mode and, for the initialisation cycle, the
// eight initial hash values H0..H7 of that mode. One 80 x 64-bit table serves
// all four SHA-2 algorithms: SHA-224/256 read the high 32 bits of entries
// 0..63; SHA-256 and SHA-512 share one initial-value table (high half / full
// word), as do SHA-224 and SHA-384 (low half / full word).
//
// Interface: mode and t in, k_t and iv out. Reads are combinational, so K_t
// for iteration t is available in the same cycle as the counter value.
//
// The document places the constants and initial values in a memory read by
// the iteration counter; the shared-table layout and asynchronous read are
// this design's choice.
module sha2_const_mem
  import sha2_pkg::*;
(
  input  sha2_mode_t mode,
  input  logic [6:0] t,       // iteration index, 0..79
  output word_t      k_t,     // K_t, zero-extended in 32-bit modes
  output hash_t      iv       // H0..H7 initial values of the mode
);

  word_t k_full;

  always_comb begin
    k_full = (t < 7'd80) ? K_ROM[t] : '0;
    k_t    = is_wide(mode) ? k_full : {32'h0, k_full[63:32]};
    for (int i = 0; i < 8; i++) begin
      case (mode)
        SHA224:  iv[i] = {32'h0, IV_384[i][31:0]};
        SHA256:  iv[i] = {32'h0, IV_512[i][63:32]};
        SHA384:  iv[i] = IV_384[i];
        default: iv[i] = IV_512[i];
      endcase
    end
  end

endmodule
