// msg_mem: message memory of one lane ("Msg1" / "Msg2"): the sixteen 32-bit
// words of the 512-bit message block as produced by message enumeration
// (for a search that starts after step 16: the random window of the last
// sixteen W words before the start step).
// One synchronous write port, one asynchronous read port.
module msg_mem
  import sha1_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [3:0] waddr,
  input  word_t      wdata,
  input  logic [3:0] raddr,
  output word_t      rdata
);
  word_t mem [NWORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
