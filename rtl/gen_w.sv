// gen_w: "Generate W" of one lane: chooses the W word that is written to the
// message memory or shifted into the expansion register.
//
// Combinational. Sources (wsrc_e):
//   WSRC_RAND  new message word from the shared random word r, with the bits
//              the characteristic fixes forced (cond_fill); lane 2 adds the
//              required difference, so both lanes get a consistent pair
//   WSRC_MSG   stored message word XOR the auxiliary-path flip mask
//   WSRC_EXP   expanded word from the XOR network (steps 16..79)
//   WSRC_SEG   stored word whose free bits (not value-fixed) are replaced by
//              the segmented-counter value; lane 2 keeps the difference
// LANE2 = 1 marks the second message of the pair. The two lanes receive the
// same random word, which is this design's way to keep their words related.
module gen_w
  import sha1_pkg::*;
#(
  parameter bit LANE2 = 1'b0
) (
  input  wsrc_e src,
  input  word_t r,
  input  cond_t c,
  input  word_t msg,
  input  word_t flip,
  input  word_t expanded,
  input  word_t seg,
  output word_t w
);
  word_t diff, free;

  always_comb begin
    diff = LANE2 ? cond_diff(c) : '0;
    free = ~c.vmask;
    unique case (src)
      WSRC_RAND: w = cond_fill(r, c) ^ diff;
      WSRC_MSG:  w = msg ^ flip;
      WSRC_EXP:  w = expanded;
      WSRC_SEG:  w = (msg & ~free) | ((seg ^ diff) & free);
      default:   w = expanded;
    endcase
  end
endmodule
