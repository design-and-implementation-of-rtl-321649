// seg_counter: "segmented counter" that enumerates all values of a set of
// free bits that need not be adjacent.
//
// mask marks the free bits (loaded by load, which also clears the count).
// Each step sets every bit outside the mask to one before adding one, so the
// carry runs straight across the fixed bits; masking the sum keeps only the
// free bits: next = ((q | ~mask) + 1) & mask. wrap is high when the next
// value would be zero again, i.e. q is the last value of the sequence.
module seg_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] mask_in,
  input  logic         step,
  output logic [W-1:0] q,
  output logic         wrap
);
  logic [W-1:0] mask, nx;

  assign nx   = ((q | ~mask) + W'(1)) & mask;
  assign wrap = (nx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      mask <= '0;
    end else if (load) begin
      q    <= '0;
      mask <= mask_in;
    end else if (step) begin
      q    <= nx;
    end
  end
endmodule
