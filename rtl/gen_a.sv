// gen_a: "Generate A" of one lane: a random A word consistent with the A part
// of the characteristic, used to reconstruct the state A(s-4)..A(s) at the
// step s where the search starts.
//
// Combinational. Lane 1 takes the random word r with the value-fixed bits
// forced; lane 2 (LANE2 = 1) is lane 1 XOR the required difference. Both
// lanes are fed the same random word.
module gen_a
  import sha1_pkg::*;
#(
  parameter bit LANE2 = 1'b0
) (
  input  word_t r,
  input  cond_t c,
  output word_t a
);
  assign a = cond_fill(r, c) ^ (LANE2 ? cond_diff(c) : '0);
endmodule
