// tb_seg_counter: for random masks with few free bits, the counter must visit
// every value of the free bits exactly once, never set a fixed bit, and raise
// wrap on the last value.
module tb_seg_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic        load, step, wrap;
  logic [31:0] mask_in, q;
  bit          seen [int unsigned];

  seg_counter #(.W(32)) dut (.clk, .rst_n, .load, .mask_in, .step, .q, .wrap);

  initial begin
    int nfree, total;
    load = 0; step = 0; mask_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      // choose 1..9 scattered free bits
      nfree = $urandom_range(1, 9);
      mask_in = '0;
      while ($countones(mask_in) < nfree) mask_in[$urandom_range(0, 31)] = 1'b1;
      total = 1 << nfree;
      seen.delete();
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      check(q == '0, "load clears");
      for (int v = 0; v < total; v++) begin
        check((q & ~mask_in) == '0, "only free bits set");
        check(!seen.exists(q), $sformatf("value %h not repeated", q));
        seen[q] = 1;
        check(wrap == (v == total - 1), $sformatf("wrap at step %0d of %0d", v, total));
        step = 1;
        @(negedge clk);
        step = 0;
      end
      check(q == '0, "back to zero after all values");
      check(seen.num() == total, "all values visited");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
