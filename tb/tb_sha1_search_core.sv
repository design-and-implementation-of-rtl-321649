// tb_sha1_search_core: end-to-end test of the collision-search building block
// through its system bus (NAP reduced to 2 to reach every enumeration mode
// quickly).
//   1. A fully fixed characteristic that reproduces SHA-1("abc"): one trial,
//      eighty steps, exact cycle count and statistics.
//   2. An unreachable condition at step 40: every trial stops at step 40;
//      the search is ended with a stop request.
//   3. A probabilistic characteristic with a message difference, auxiliary
//      paths and the segmented counter: the found pair is read back and
//      verified against a reference SHA-1 computation.
//   4. The same from start step 30 with a reconstructed state: random
//      A words and a random W window W(14)..W(29) that meet the characteristic.
module tb_sha1_search_core;
  import sha1_ref_pkg::*;
  import sha1_pkg::*;

  localparam int NAP = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic        bus_we, bus_re, bus_rvalid, busy, found;

  sha1_search_core #(.NAP(NAP)) dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re,
                                     .bus_rdata, .bus_rvalid, .busy, .found);

  // mechanism counters, observed on the FSM control word
  int n_ap, n_seg, n_seed, n_prew;
  always @(posedge clk) begin
    if (dut.ctl.ap_step)    n_ap++;
    if (dut.ctl.seg_step)   n_seg++;
    if (dut.ctl.reseed_inc) n_seed++;
    if (busy && !dut.ctl.eo_valid && dut.ctl.w_shift) n_prew++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus access
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
    check(bus_rvalid, "read data valid one cycle after the request");
    d = bus_rdata;
  endtask

  task automatic rd64(input logic [11:0] a, output longint unsigned d);
    logic [31:0] lo, hi;
    rd(a, lo);
    rd(a + 12'd1, hi);
    d = {hi, lo};
  endtask

  // ---------------- characteristic held in the testbench and written to the DUT
  cond_t wch [80];
  cond_t ach [85];

  task automatic write_char();
    for (int r = 0; r < 80; r++) begin
      wr(12'h200 + 12'(r * 4) + 0, wch[r].dmask);
      wr(12'h200 + 12'(r * 4) + 1, wch[r].dval);
      wr(12'h200 + 12'(r * 4) + 2, wch[r].vmask);
      wr(12'h200 + 12'(r * 4) + 3, wch[r].vval);
    end
    for (int r = 0; r < 85; r++) begin
      wr(12'h400 + 12'(r * 4) + 0, ach[r].dmask);
      wr(12'h400 + 12'(r * 4) + 1, ach[r].dval);
      wr(12'h400 + 12'(r * 4) + 2, ach[r].vmask);
      wr(12'h400 + 12'(r * 4) + 3, ach[r].vval);
    end
  endtask

  function automatic bit ok(input logic [31:0] x1, input logic [31:0] x2, input cond_t c);
    for (int b = 0; b < 32; b++) begin
      if (c.dmask[b] && ((x1[b] ^ x2[b]) != c.dval[b])) return 0;
      if (c.vmask[b] && (x1[b] != c.vval[b])) return 0;
    end
    return 1;
  endfunction

  function automatic void clear_char();
    for (int r = 0; r < 80; r++) wch[r] = '0;
    for (int r = 0; r < 85; r++) ach[r] = '0;
  endfunction

  // run one lane from state A(s-4..s) (aj index j+4) over steps s..e
  function automatic void ref_lane(input logic [511:0] blk, input int s, input int e,
                                   inout logic [31:0] aj [85]);
    logic [31:0] ws [80];
    r_schedule(blk, ws);
    for (int i = s; i <= e; i++)
      aj[i + 5] = r_step(i, aj[i + 4], aj[i + 3], r_rotl(aj[i + 2], 30), r_rotl(aj[i + 1], 30),
                         r_rotl(aj[i], 30), ws[i]);
  endfunction

  // same from a schedule given as words
  function automatic void ref_lane_ws(input logic [31:0] ws [80], input int s, input int e,
                                      inout logic [31:0] aj [85]);
    for (int i = s; i <= e; i++)
      aj[i + 5] = r_step(i, aj[i + 4], aj[i + 3], r_rotl(aj[i + 2], 30), r_rotl(aj[i + 1], 30),
                         r_rotl(aj[i], 30), ws[i]);
  endfunction

  // schedule from 16 stored words W(b)..W(b+15); later words by the expansion
  // recurrence, earlier ones are left at zero and never used
  function automatic void window_schedule(input logic [31:0] m [16], input int b,
                                          output logic [31:0] ws [80]);
    for (int i = 0; i < 80; i++) ws[i] = '0;
    for (int k = 0; k < 16; k++) ws[b + k] = m[k];
    for (int i = b + 16; i < 80; i++)
      ws[i] = r_rotl(ws[i - 3] ^ ws[i - 8] ^ ws[i - 14] ^ ws[i - 16], 1);
  endfunction

  // read both stored word sets and verify the pair against the characteristic;
  // for a start step s > 16 they are the window W(s-16)..W(s-1), else the message
  task automatic verify_pair(input int s, input int e, input string tag);
    logic [31:0] m1 [16];
    logic [31:0] m2 [16];
    logic [31:0] ws1 [80];
    logic [31:0] ws2 [80];
    logic [31:0] a1 [85];
    logic [31:0] a2 [85];
    int b;
    bit all_ok;
    b = (s > 16) ? s - 16 : 0;
    for (int k = 0; k < 16; k++) begin
      rd(12'h600 + 12'(k), m1[k]);
      rd(12'h610 + 12'(k), m2[k]);
    end
    window_schedule(m1, b, ws1);
    window_schedule(m2, b, ws2);
    all_ok = 1;
    for (int k = b; k < b + 16; k++) all_ok &= ok(ws1[k], ws2[k], wch[k]);
    check(all_ok, {tag, ": stored words meet the W conditions"});
    all_ok = 1;
    for (int i = s; i <= e; i++) all_ok &= ok(ws1[i], ws2[i], wch[i]);
    check(all_ok, {tag, ": expanded words meet the W conditions"});
    // the state rows are fully value-fixed in these tests
    for (int r = 0; r < 85; r++) begin a1[r] = '0; a2[r] = '0; end
    for (int r = s; r < s + 5; r++) begin
      a1[r] = ach[r].vval;
      a2[r] = ach[r].vval ^ (ach[r].dmask & ach[r].dval);
    end
    ref_lane_ws(ws1, s, e, a1);
    ref_lane_ws(ws2, s, e, a2);
    all_ok = 1;
    for (int i = s; i <= e; i++) all_ok &= ok(a1[i + 5], a2[i + 5], ach[i + 5]);
    check(all_ok, {tag, ": A words of both lanes meet the A conditions"});
  endtask

  task automatic wait_idle(input int limit, output int cyc);
    cyc = 0;
    while (busy && cyc < limit) begin @(posedge clk); #1; cyc++; end
  endtask

  task automatic check_stats(input int s, input int e, input string tag);
    longint unsigned tr, eos, n, nprev, sum;
    bit mono = 1;
    rd64(A_TRIALS, tr);
    rd64(A_EOS, eos);
    sum = 0; nprev = 0;
    for (int i = 0; i < 80; i++) begin
      rd64(12'hA00 + 12'(2 * i), n);
      sum += n;
      if (i < s) check(n == 0, $sformatf("%s: N(%0d) zero before the start step", tag, i));
      if (i == s) check(n == tr, $sformatf("%s: N(start) equals trials", tag));
      if (i > s && n > nprev) mono = 0;
      nprev = n;
    end
    check(mono, {tag, ": N(i) never grows with i"});
    check(sum == eos, {tag, ": sum of N(i) equals elementary operations"});
  endtask

  localparam logic [31:0] CFG_CHECKS = 32'h000C_0000;

  initial begin
    logic [31:0] d, st [5];
    logic [31:0] aj [85];
    logic [511:0] abc;
    longint unsigned v;
    int cyc, s, e;
    bus_addr = 0; bus_wdata = 0; bus_we = 0; bus_re = 0;
    n_ap = 0; n_seg = 0; n_seed = 0; n_prew = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- 1. fixed characteristic = SHA-1("abc")
    abc = {32'h61626380, {14{32'h0}}, 32'h00000018};
    clear_char();
    for (int k = 0; k < 16; k++) begin
      wch[k].vmask = '1; wch[k].vval = abc[511 - 32*k -: 32];
    end
    aj[0] = r_rotl(32'hc3d2e1f0, 2); aj[1] = r_rotl(32'h10325476, 2);
    aj[2] = r_rotl(32'h98badcfe, 2); aj[3] = 32'hefcdab89; aj[4] = 32'h67452301;
    ref_lane(abc, 0, 79, aj);
    check(32'h67452301 + aj[84] == 32'ha9993e36, "reference model gives SHA-1(abc)");
    for (int r = 0; r < 85; r++) begin ach[r].vmask = '1; ach[r].vval = aj[r]; end
    write_char();
    rd(12'h200 + 12'(4 * 7 + 3), d);
    check(d == wch[7].vval, "characteristic reads back");
    wr(A_CONFIG, CFG_CHECKS | (32'd79 << 8));
    wr(A_CTRL, 32'h8);                 // clear statistics
    @(negedge clk);
    bus_addr = A_CTRL; bus_wdata = 32'h1; bus_we = 1;   // start
    @(posedge clk);
    #1 bus_we = 0;
    wait_idle(1000, cyc);
    check(cyc == 117, $sformatf("fixed run: 16+5+80+16 = 117 cycles, got %0d", cyc));
    check(found, "fixed run: found");
    rd(A_CTRL, d);
    check(d[1:0] == 2'b10, "status: idle and found");
    rd(A_ROUND, d);
    check(d == 79, "found at step 79");
    rd64(A_EOS, v);     check(v == 80, "fixed run: 80 elementary operations");
    rd64(A_TRIALS, v);  check(v == 1, "fixed run: one trial");
    rd64(A_FOUNDS, v);  check(v == 1, "fixed run: one found pair");
    for (int i = 0; i < 80; i += 13) begin
      rd64(12'hA00 + 12'(2 * i), v);
      check(v == 1, $sformatf("fixed run: N(%0d) = 1", i));
    end
    verify_pair(0, 79, "fixed run");

    // ---------------- 2. unreachable condition at step 40, stop request
    clear_char();
    for (int r = 0; r < 5; r++) begin ach[r].vmask = '1; ach[r].vval = $urandom; end
    for (int k = 0; k < 16; k++) begin
      wch[k].vmask = 32'h0000ffff;    // half of each word random
      wch[k].vval  = $urandom;
    end
    ach[45].vmask = '1;                // all 32 bits of A(41) fixed: never met
    ach[45].vval  = $urandom;
    write_char();
    wr(A_CTRL, 32'h8);
    wr(A_CTRL, 32'h1);
    repeat (3000) @(posedge clk);
    wr(A_CTRL, 32'h2);                 // stop
    wait_idle(1000, cyc);
    check(!busy && cyc < 200, "stop request ends the search");
    check(!found, "nothing found");
    rd64(A_TRIALS, v);
    check(v > 10, $sformatf("many trials (%0d)", v));
    rd64(12'hA00 + 12'(2 * 40), e);
    check(longint'(e) == v, "every trial reached step 40");
    rd64(12'hA00 + 12'(2 * 41), e);
    check(e == 0, "no trial passed step 40");
    rd64(A_RESEEDS, e);
    check(longint'(e) == v, "without AP every trial is a fresh message");
    check_stats(0, 79, "unreachable");

    // ---------------- 3. probabilistic characteristic, difference, AP, segmented counter
    clear_char();
    s = 0; e = 24;
    for (int r = 0; r < 5; r++) begin ach[r].vmask = '1; ach[r].vval = $urandom; end
    wch[3].dmask = 32'h20; wch[3].dval = 32'h20;          // message difference in W(3) bit 5
    wch[15].vmask = 32'hfffffff3; wch[15].vval = $urandom; // two free bits in W(15)
    ach[4 + 4].dmask = 32'h20; ach[4 + 4].dval = 32'h20;  // A(4) differs in bit 5
    ach[10].vmask = 32'h00000300; ach[10].vval = $urandom;
    ach[16].vmask = 32'h00030000; ach[16].vval = $urandom;
    ach[22].vmask = 32'h30000000; ach[22].vval = $urandom;
    ach[29].vmask = 32'h00000003; ach[29].vval = $urandom;
    write_char();
    // AP masks: path 0 flips bits of W(12), path 1 of W(13), same in both lanes
    for (int p = 0; p < NAP; p++) begin
      for (int k = 0; k < 16; k++) begin
        d = (k == 12 + p) ? $urandom : 32'h0;
        wr(12'h800 + 12'(p * 16 + k), d);
        wr(12'h900 + 12'(p * 16 + k), d);
      end
    end
    n_ap = 0; n_seg = 0; n_seed = 0;
    wr(A_SEED, 32'h1234_5678);
    wr(A_CTRL, 32'h4);
    wr(A_CONFIG, CFG_CHECKS | 32'h0003_0000 | (32'd15 << 24) | (32'(e) << 8) | 32'(s));
    wr(A_CTRL, 32'h9);                 // clear statistics and start
    wait_idle(2000000, cyc);
    check(found, "probabilistic run: found");
    rd(A_ROUND, d);
    check(d == 32'(e), "found at the end step");
    verify_pair(s, e, "probabilistic run");
    check_stats(s, e, "probabilistic run");
    check(n_ap > 0, $sformatf("AP flips happened (%0d)", n_ap));
    check(n_seg > 0, $sformatf("segmented-counter steps happened (%0d)", n_seg));
    check(n_seed > 1, $sformatf("reseeds happened (%0d)", n_seed));

    // ---------------- 4. start from step 30 with a reconstructed state
    clear_char();
    s = 30; e = 42;
    for (int r = s; r < s + 5; r++) begin ach[r].vmask = '1; ach[r].vval = $urandom; end
    ach[s + 1].dmask = 32'h1; ach[s + 1].dval = 32'h1;     // lanes differ in A(s-3)
    wch[s - 10].vmask = 32'h0000ff00; wch[s - 10].vval = $urandom;   // inside the window
    wch[s + 2].vmask  = 32'h00000003; wch[s + 2].vval  = $urandom;   // an expanded word
    ach[38].vmask = 32'h00000c00; ach[38].vval = $urandom;
    ach[44].vmask = 32'h00c00000; ach[44].vval = $urandom;
    ach[47].vmask = 32'h00000001; ach[47].vval = $urandom;
    write_char();
    n_prew = 0;
    wr(A_CONFIG, CFG_CHECKS | (32'(e) << 8) | 32'(s));
    wr(A_CTRL, 32'h9);
    wait_idle(2000000, cyc);
    check(found, "start-step run: found");
    verify_pair(s, e, "start-step run");
    check_stats(s, e, "start-step run");
    rd64(A_TRIALS, v);
    check(n_prew == 16 * v, $sformatf("window load of 16 words per trial (%0d, %0d trials)",
                                      n_prew, v));

    $display("mechanisms: ap=%0d seg=%0d reseed=%0d prew=%0d", n_ap, n_seg, n_seed, n_prew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
