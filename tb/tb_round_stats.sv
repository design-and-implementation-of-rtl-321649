// tb_round_stats: per-step statistics of a collision search over the last
// steps of a characteristic, at the design's default parameters.
//
// The search starts at step 64 from a reconstructed state, as when a
// characteristic is studied in one of its regions. Step i gets k(i) fixed
// bits on A(i+1), so the pass probability is P(i) = 2^-k(i). Three profiles
// of k(i) are run, taken from published per-round probability tables of a
// SHA-1 characteristic:
//   with inter-bit constraints,   steps 64-71: 2 1 3 3 3 3 4 1
//     (the whole tail of the table down to its last step; 2^20 trials are
//     expected before a pair passes step 71)
//   with constraint relaxation,   steps 64-67: 1 1 2 2
//   with neither,                 steps 64-66: 3 2 3
// Each run stops at the first pair that passes its last step, so the trial
// count is one sample of a geometric distribution. The LFSR seed and the
// condition values are fixed, so the run is the same every time. The testbench
// checks that:
//   * N(i+1) matches N(i)*P(i) within five binomial standard deviations;
//   * N(last) matches the expected number of trials, 1/P(last);
//   * each step costs exactly one clock cycle: the run's cycle count equals
//     trials*(16 + 5 + 16 + 1) - 1 + EOs + 16.
// It prints log2 N(i), to compare with the backward recursion
// N(i) = N(i+1) / P(i), N(last) = 1/P(last).
module tb_round_stats;
  import sha1_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0]  bus_addr;
  logic [31:0]  bus_wdata, bus_rdata;
  logic         bus_we, bus_re, bus_rvalid, busy, found;
  logic         hash_in_ready, hash_digest_valid;
  logic [159:0] hash_digest;

  sha1_top dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata, .bus_rvalid,
                .search_busy(busy), .search_found(found), .hash_in_valid(1'b0),
                .hash_in_data('0), .hash_in_last(1'b0), .hash_in_bytes('0), .hash_in_ready,
                .hash_digest, .hash_digest_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (300000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    d = bus_rdata;
  endtask

  task automatic rd64(input logic [11:0] a, output longint unsigned d);
    logic [31:0] lo, hi;
    rd(a, lo);
    rd(a + 12'd1, hi);
    d = {hi, lo};
  endtask

  task automatic wr_cond(input logic [11:0] base, input int r, input cond_t c);
    wr(base + 12'(r * 4) + 0, c.dmask);
    wr(base + 12'(r * 4) + 1, c.dval);
    wr(base + 12'(r * 4) + 2, c.vmask);
    wr(base + 12'(r * 4) + 3, c.vval);
  endtask

  // fixed pseudo-random values for the conditions, so every run of this
  // testbench (with its fixed LFSR seed) takes the same number of trials
  logic [31:0] xs = 32'h2545f491;
  function automatic logic [31:0] next_val();
    xs ^= xs << 13;
    xs ^= xs >> 17;
    xs ^= xs << 5;
    return xs;
  endfunction

  task automatic run_profile(input string name, input int s, input int k [$]);
    cond_t c;
    int e, cyc;
    longint unsigned n [80];
    longint unsigned tr, eos;
    real p, exp_n, sd;
    e = s + k.size() - 1;
    // clear both parts, then the state rows s..s+4 and one row per checked step
    for (int r = 0; r < 80; r++) wr_cond(12'h200, r, '0);
    for (int r = 0; r < 85; r++) wr_cond(12'h400, r, '0);
    for (int r = s; r < s + 5; r++) begin
      c = '0; c.vmask = 32'hffff0000; c.vval = next_val();   // partly fixed state
      wr_cond(12'h400, r, c);
    end
    for (int j = 0; j < k.size(); j++) begin
      c = '0;
      c.vmask = ((32'h1 << k[j]) - 1) << (4 * j);          // k(i) fixed bits of A(i+1)
      c.vval = next_val();
      wr_cond(12'h400, s + j + 5, c);
    end
    wr(A_CONFIG, 32'h000C_0000 | (32'(e) << 8) | 32'(s));
    @(negedge clk);
    bus_addr = A_CTRL; bus_wdata = 32'h9; bus_we = 1;      // clear statistics, start
    @(posedge clk);
    #1 bus_we = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    check(found, {name, ": pair found"});
    rd64(A_TRIALS, tr);
    rd64(A_EOS, eos);
    for (int i = s; i <= e; i++) rd64(12'hA00 + 12'(2 * i), n[i]);
    check(longint'(cyc) == tr * (16 + 5 + 16 + 1) - 1 + eos + 16,
          $sformatf("%s: one cycle per step (%0d cycles, %0d trials, %0d EOs)", name, cyc, tr,
                    eos));
    check(n[s] == tr, {name, ": every trial starts at the start step"});
    for (int j = 0; j < k.size(); j++) begin
      $display("%s  step %0d  log2 P = -%0d  N = %0d  log2 N = %.2f", name, s + j, k[j],
               n[s + j], $ln(real'(n[s + j])) / $ln(2.0));
    end
    for (int j = 0; j + 1 < k.size(); j++) begin
      p = 1.0 / real'(1 << k[j]);
      exp_n = real'(n[s + j]) * p;
      sd = $sqrt(real'(n[s + j]) * p * (1.0 - p));
      check(real'(n[s + j + 1]) - exp_n <= 5.0 * sd + 2.0 &&
            exp_n - real'(n[s + j + 1]) <= 5.0 * sd + 2.0,
            $sformatf("%s: N(%0d) = %0d against %.1f", name, s + j + 1, n[s + j + 1], exp_n));
    end
    // the number of trials that reach the last step is geometric with mean 2^k(last)
    exp_n = real'(1 << k[k.size() - 1]);
    check(real'(n[e]) <= 12.0 * exp_n, $sformatf("%s: N(last) = %0d, mean %.0f", name, n[e],
                                                 exp_n));
  endtask

  initial begin
    bus_addr = 0; bus_wdata = 0; bus_we = 0; bus_re = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(A_SEED, 32'h0bad_5eed);
    wr(A_CTRL, 32'h4);
    run_profile("with IBCs", 64, '{2, 1, 3, 3, 3, 3, 4, 1});
    run_profile("with CR  ", 64, '{1, 1, 2, 2});
    run_profile("neither  ", 64, '{3, 2, 3});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
