// sha1_round: one SHA-1 step (the "round function" of each lane).
//
// Combinational. From the five most recent A words A(i)..A(i-4) and the
// message-expansion word W(i) it computes
//   A(i+1) = ROTL5(A(i)) + F_i(A(i-1), ROTL30(A(i-2)), ROTL30(A(i-3)))
//            + ROTL30(A(i-4)) + W(i) + K_i
// which is the standard SHA-1 step with b..e expressed through earlier A
// words. F_i and K_i change every twenty steps (sha1_pkg). The step, with
// the register updates around it, fits in one clock cycle: one "elementary
// operation" per cycle.
//
// a[0] = A(i), a[1] = A(i-1), ..., a[4] = A(i-4); t = step index 0..79.
module sha1_round
  import sha1_pkg::*;
(
  input  word_t      a [5],
  input  word_t      w,
  input  logic [6:0] t,
  output word_t      a_next
);
  word_t fv;

  always_comb begin
    fv     = f_t(t, a[1], rotl(a[2], 30), rotl(a[3], 30));
    a_next = rotl(a[0], 5) + fv + rotl(a[4], 30) + w + k_t(t);
  end
endmodule
