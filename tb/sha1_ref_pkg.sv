// sha1_ref_pkg: reference model of SHA-1 for the testbenches, written in the
// textbook form with five working variables a..e (FIPS 180 style), so it is
// independent of the A-register form used by the RTL.
package sha1_ref_pkg;

  function automatic logic [31:0] r_rotl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [31:0] r_f(input int t, input logic [31:0] b, c, d);
    if (t < 20)      return (b & c) ^ (~b & d);
    else if (t < 40) return b ^ c ^ d;
    else if (t < 60) return (b & c) ^ (b & d) ^ (c & d);
    else             return b ^ c ^ d;
  endfunction

  function automatic logic [31:0] r_k(input int t);
    if (t < 20)      return 32'h5a827999;
    else if (t < 40) return 32'h6ed9eba1;
    else if (t < 60) return 32'h8f1bbcdc;
    else             return 32'hca62c1d6;
  endfunction

  // full 80-word schedule of a block (word 0 = blk[511:480])
  function automatic void r_schedule(input logic [511:0] blk, output logic [31:0] w [80]);
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 80; t++) w[t] = r_rotl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
  endfunction

  // compression of one block, h = {H0..H4}
  function automatic logic [159:0] r_compress(input logic [159:0] h, input logic [511:0] blk);
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, tmp;
    r_schedule(blk, w);
    {a, b, c, d, e} = h;
    for (int t = 0; t < 80; t++) begin
      tmp = r_rotl(a, 5) + r_f(t, b, c, d) + e + w[t] + r_k(t);
      e = d; d = c; c = r_rotl(b, 30); b = a; a = tmp;
    end
    return {h[159:128] + a, h[127:96] + b, h[95:64] + c, h[63:32] + d, h[31:0] + e};
  endfunction

  localparam logic [159:0] R_IV = {32'h67452301, 32'hefcdab89, 32'h98badcfe,
                                   32'h10325476, 32'hc3d2e1f0};

  // One step in a..e form; returns the new a, which is A(t+1)
  function automatic logic [31:0] r_step(input int t, input logic [31:0] a, b, c, d, e,
                                         input logic [31:0] w);
    return r_rotl(a, 5) + r_f(t, b, c, d) + e + w + r_k(t);
  endfunction

endpackage
