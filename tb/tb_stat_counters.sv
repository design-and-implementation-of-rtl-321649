// tb_stat_counters: random increments of the per-step counters and totals
// against a model, then clear.
module tb_stat_counters;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic        clear, eo_valid, trial_inc, reseed_inc, found_inc;
  logic [6:0]  eo_round, rd_round;
  logic [63:0] n_count, eo_total, trials, reseeds, founds;
  longint unsigned mn [80];
  longint unsigned me, mt, mr, mf;

  stat_counters #(.NR(80), .CW(64)) dut (.clk, .rst_n, .clear, .eo_valid, .eo_round,
    .trial_inc, .reseed_inc, .found_inc, .rd_round, .n_count, .eo_total, .trials,
    .reseeds, .founds);

  initial begin
    clear = 0; eo_valid = 0; trial_inc = 0; reseed_inc = 0; found_inc = 0;
    eo_round = 0; rd_round = 0;
    me = 0; mt = 0; mr = 0; mf = 0;
    for (int k = 0; k < 80; k++) mn[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      eo_valid = $urandom_range(0, 1);
      eo_round = 7'($urandom_range(0, 20));
      trial_inc = $urandom_range(0, 1);
      reseed_inc = ($urandom_range(0, 3) == 0);
      found_inc = ($urandom_range(0, 7) == 0);
      if (eo_valid) begin mn[eo_round]++; me++; end
      if (trial_inc) mt++;
      if (reseed_inc) mr++;
      if (found_inc) mf++;
    end
    @(negedge clk);
    eo_valid = 0; trial_inc = 0; reseed_inc = 0; found_inc = 0;
    @(negedge clk);
    for (int k = 0; k < 80; k++) begin
      rd_round = 7'(k); #1;
      check(n_count == mn[k], $sformatf("N(%0d)", k));
    end
    check(eo_total == me, "EO total");
    check(trials == mt, "trials");
    check(reseeds == mr, "reseeds");
    check(founds == mf, "founds");
    clear = 1;
    @(negedge clk);
    clear = 0;
    rd_round = 7'd5; #1;
    check(n_count == 0 && eo_total == 0 && trials == 0 && reseeds == 0 && founds == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
