// tb_sha1_hash: hashes "abc" and the empty message (known digests), then
// random multi-block messages against the reference compression function,
// and checks that digest_valid rises 81 clock edges after the accepting edge.
module tb_sha1_hash;
  import sha1_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic         init, blk_valid, ready, digest_valid;
  logic [511:0] blk;
  logic [159:0] digest;

  sha1_hash dut (.clk, .rst_n, .init, .blk_valid, .blk, .ready, .digest, .digest_valid);

  // hash one block; returns the digest and checks the latency
  task automatic hash_block(input logic [511:0] b, input bit first, output logic [159:0] d);
    int cyc;
    @(negedge clk);
    while (!ready) @(negedge clk);
    blk = b; blk_valid = 1; init = first;
    @(posedge clk);
    #1;
    blk_valid = 0; init = 0;
    cyc = 0;
    while (!digest_valid) begin
      @(posedge clk);
      #1;
      cyc++;
      if (cyc > 200) break;
    end
    check(cyc == 81, $sformatf("latency %0d cycles", cyc));
    check(ready, "ready with digest");
    d = digest;
  endtask

  initial begin
    logic [159:0] d, ref_h;
    logic [511:0] b;
    init = 0; blk_valid = 0; blk = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hash_block({32'h61626380, {14{32'h0}}, 32'h00000018}, 1'b1, d);
    check(d == 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "SHA-1(abc)");
    hash_block({32'h80000000, {15{32'h0}}}, 1'b1, d);
    check(d == 160'hda39a3ee5e6b4b0d3255bfef95601890afd80709, "SHA-1(empty)");
    for (int m = 0; m < 6; m++) begin
      ref_h = R_IV;
      for (int k = 0; k <= m % 3; k++) begin
        for (int j = 0; j < 16; j++) b[32*j +: 32] = $urandom;
        hash_block(b, k == 0, d);
        ref_h = r_compress(ref_h, b);
        check(d == ref_h, $sformatf("message %0d block %0d", m, k));
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
