// sha1_top: the two SHA-1 designs side by side, each with its own ports.
//
//  * u_search: one building block of the FPGA SHA-1 collision-search
//    platform (sha1_search_core), reached through its system bus; busy and
//    found are its control/status signals.
//  * u_pad + u_hash: a plain SHA-1 hash unit. The message arrives as
//    512-bit chunks (valid/ready, the last one with its byte count); the
//    padder (sha1_pad) turns them into padded blocks for the compression
//    core (sha1_hash). hash_digest_valid is high for one cycle when the
//    digest of a whole message is ready, 81 cycles after its final padded
//    block was accepted; the digests of earlier blocks are not flagged.
// The host processor that drives the bus is outside this design.
module sha1_top
  import sha1_pkg::*;
#(
  parameter int unsigned NAP = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // collision-search block: system bus
  input  logic [11:0]  bus_addr,
  input  logic [31:0]  bus_wdata,
  input  logic         bus_we,
  input  logic         bus_re,
  output logic [31:0]  bus_rdata,
  output logic         bus_rvalid,
  output logic         search_busy,
  output logic         search_found,
  // hash core
  input  logic         hash_in_valid,
  input  logic [511:0] hash_in_data,
  input  logic         hash_in_last,
  input  logic [6:0]   hash_in_bytes,
  output logic         hash_in_ready,
  output logic [159:0] hash_digest,
  output logic         hash_digest_valid
);
  sha1_search_core #(.NAP(NAP)) u_search (
    .clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata, .bus_rvalid,
    .busy(search_busy), .found(search_found)
  );

  logic         pad_valid, pad_first, pad_last, core_ready, core_dvalid, final_pend;
  logic [511:0] pad_blk;

  sha1_pad u_pad (
    .clk, .rst_n, .in_valid(hash_in_valid), .in_data(hash_in_data), .in_last(hash_in_last),
    .in_bytes(hash_in_bytes), .in_ready(hash_in_ready), .out_valid(pad_valid), .out_blk(pad_blk),
    .out_first(pad_first), .out_last(pad_last), .out_ready(core_ready)
  );

  sha1_hash u_hash (
    .clk, .rst_n, .init(pad_valid && pad_first), .blk_valid(pad_valid), .blk(pad_blk),
    .ready(core_ready), .digest(hash_digest), .digest_valid(core_dvalid)
  );

  // the core's digest belongs to a whole message after its final block
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      final_pend <= 1'b0;
    else if (pad_valid && core_ready && pad_last)    final_pend <= 1'b1;
    else if (core_dvalid)                            final_pend <= 1'b0;
  end
  assign hash_digest_valid = core_dvalid && final_pend;
endmodule
