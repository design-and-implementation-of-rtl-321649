// char_mem: memory holding one part (W or A) of the differential
// characteristic, one condition row (cond_t, four 32-bit fields) per word.
//
// The W part has one row per step (80); the A part has one row per A word
// A(-4)..A(80) (85 rows, row r = A(r-4)). The host writes one 32-bit field
// at a time (we, waddr, wfield, wdata); the row at raddr is read
// asynchronously, as a distributed RAM would be. Both lanes share the memory.
module char_mem
  import sha1_pkg::*;
#(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned AW    = 7
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cond_field_e   wfield,
  input  word_t         wdata,
  input  logic [AW-1:0] raddr,
  output cond_t         rdata
);
  cond_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) begin
      unique case (wfield)
        F_DMASK: mem[waddr].dmask <= wdata;
        F_DVAL:  mem[waddr].dval  <= wdata;
        F_VMASK: mem[waddr].vmask <= wdata;
        F_VVAL:  mem[waddr].vval  <= wdata;
      endcase
    end
  end

  assign rdata = (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
endmodule
