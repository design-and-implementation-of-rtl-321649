// evaluate: compliance check of both lanes against the characteristic for
// the current step i.
//
// Combinational. It checks the pair W(i) against W-part row i and the pair
// A(i+1) just computed by the two round functions against A-part row i+5
// (row r = A(r-4)). check_w / check_a switch either check off, which makes
// the compliance check configurable. pass is high when every enabled check
// holds.
module evaluate
  import sha1_pkg::*;
(
  input  word_t w1,
  input  word_t w2,
  input  cond_t wc,
  input  word_t a1,
  input  word_t a2,
  input  cond_t ac,
  input  logic  check_w,
  input  logic  check_a,
  output logic  w_ok,
  output logic  a_ok,
  output logic  pass
);
  always_comb begin
    w_ok = cond_ok(w1, w2, wc);
    a_ok = cond_ok(a1, a2, ac);
    pass = (w_ok || !check_w) && (a_ok || !check_a);
  end
endmodule
