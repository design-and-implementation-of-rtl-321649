// sha1_wexp: message-expansion shift register of one lane.
//
// Holds the last sixteen words of the expansion sequence,
// w[0] = W(i) (newest) ... w[15] = W(i-15), and the XOR network that gives
// the next word W(i+1) = ROTL1(W(i-2) ^ W(i-7) ^ W(i-13) ^ W(i-15)).
// shift_en shifts w_in (normally W(i+1), produced by Generate W) into w[0]
// on the rising clock edge; w_expanded is combinational from the register.
// Reset clears the register (the design's choice; nothing depends on it).
module sha1_wexp
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_en,
  input  word_t w_in,
  output word_t w [16],
  output word_t w_expanded
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) w[k] <= '0;
    end else if (shift_en) begin
      w[0] <= w_in;
      for (int k = 1; k < 16; k++) w[k] <= w[k-1];
    end
  end

  assign w_expanded = rotl(w[2] ^ w[7] ^ w[13] ^ w[15], 1);
endmodule
