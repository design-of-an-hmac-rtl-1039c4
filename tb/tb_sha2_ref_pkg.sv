// tb_sha2_ref_pkg: reference SHA-2 word functions for the testbenches,
// written separately from the design's package (explicit 32-bit and 64-bit
// versions of the FIPS 180-4 functions) so that a testbench does not check the
// design against its own code.
package tb_sha2_ref_pkg;

  function automatic logic [31:0] r32(logic [31:0] x, int n);
    logic [63:0] d = {x, x};
    return 32'(d >> n);
  endfunction

  function automatic logic [63:0] r64(logic [63:0] x, int n);
    logic [127:0] d = {x, x};
    return 64'(d >> n);
  endfunction

  // s0/s1: message schedule, S0/S1: compression
  function automatic logic [63:0] ref_s0(bit wide, logic [63:0] x);
    if (wide) return r64(x, 1) ^ r64(x, 8) ^ (x >> 7);
    return {32'h0, r32(x[31:0], 7) ^ r32(x[31:0], 18) ^ (x[31:0] >> 3)};
  endfunction

  function automatic logic [63:0] ref_s1(bit wide, logic [63:0] x);
    if (wide) return r64(x, 19) ^ r64(x, 61) ^ (x >> 6);
    return {32'h0, r32(x[31:0], 17) ^ r32(x[31:0], 19) ^ (x[31:0] >> 10)};
  endfunction

  function automatic logic [63:0] ref_S0(bit wide, logic [63:0] x);
    if (wide) return r64(x, 28) ^ r64(x, 34) ^ r64(x, 39);
    return {32'h0, r32(x[31:0], 2) ^ r32(x[31:0], 13) ^ r32(x[31:0], 22)};
  endfunction

  function automatic logic [63:0] ref_S1(bit wide, logic [63:0] x);
    if (wide) return r64(x, 14) ^ r64(x, 18) ^ r64(x, 41);
    return {32'h0, r32(x[31:0], 6) ^ r32(x[31:0], 11) ^ r32(x[31:0], 25)};
  endfunction

  function automatic logic [63:0] ref_add(bit wide, logic [63:0] x, logic [63:0] y);
    logic [63:0] s = x + y;
    return wide ? s : {32'h0, s[31:0]};
  endfunction

  function automatic logic [63:0] rnd(bit wide);
    logic [63:0] v = {$urandom, $urandom};
    return wide ? v : {32'h0, v[31:0]};
  endfunction

endpackage
