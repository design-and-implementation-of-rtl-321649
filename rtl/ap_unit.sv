// ap_unit: auxiliary-path ("AP") bit flipper of one lane.
//
// An auxiliary path is a set of message bits whose joint flip leaves the
// pair compliant with the characteristic up to the current step, so a new
// candidate pair costs no re-enumeration. The unit stores NAP path masks
// (sixteen 32-bit words each, written by the host) and a NAP-bit counter.
// The counter value selects which paths are flipped: the flip word for
// message word word_sel is the XOR of the masks of the selected paths, and is
// applied on the fly as the message is read. step advances to the next
// combination, clear returns to "no flip"; wrap is high on the last
// combination. NAP and the counter order are this design's choice.
module ap_unit
  import sha1_pkg::*;
#(
  parameter int unsigned NAP = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [3:0] wpath,
  input  logic [3:0] wword,
  input  word_t      wdata,
  input  logic       clear,
  input  logic       step,
  input  logic [3:0] word_sel,
  output word_t      flip,
  output logic [NAP-1:0] ctr,
  output logic       wrap
);
  localparam int unsigned PW = (NAP > 1) ? $clog2(NAP) : 1;

  word_t mask [NAP][16];

  always_ff @(posedge clk) begin
    if (we && wpath < 4'(NAP)) mask[wpath[PW-1:0]][wword] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ctr <= '0;
    else if (clear) ctr <= '0;
    else if (step)  ctr <= ctr + 1'b1;
  end

  assign wrap = &ctr;

  always_comb begin
    flip = '0;
    for (int p = 0; p < NAP; p++) begin
      if (ctr[p]) flip = flip ^ mask[p][word_sel];
    end
  end
endmodule
