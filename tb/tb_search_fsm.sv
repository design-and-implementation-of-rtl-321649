// tb_search_fsm: drives the search FSM with scripted evaluate results and
// checks its control word cycle by cycle: the reseed, state-load, pre-run,
// run, AP, segmented-counter, commit and stop sequences, for an early start
// step (stored words are W(0)..W(15)) and a late one (stored words are the
// window W(s-16)..W(s-1)).
module tb_search_fsm;
  import sha1_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, stop, ap_wrap, seg_wrap, pass, busy, found;
  search_cfg_t  cfg;
  search_ctrl_t ctl;
  logic [6:0]   last_round;

  search_fsm dut (.clk, .rst_n, .start, .stop, .cfg, .ap_wrap, .seg_wrap, .pass, .ctl, .busy,
                  .found, .last_round);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample the control word in the middle of a cycle, then advance
  task automatic step_cycle();
    @(posedge clk);
    #1;
  endtask

  // first step whose W word is stored
  function automatic int wbase(input int s);
    return (s > 16) ? s - 16 : 0;
  endfunction

  task automatic expect_seed(input int s);
    for (int k = 0; k < 16; k++) begin
      check(ctl.wsrc == WSRC_RAND && ctl.msg_we && ctl.lfsr_step && ctl.msg_addr == 4'(k) &&
            ctl.wchar_addr == 7'(wbase(s) + k) && !ctl.eo_valid, $sformatf("seed word %0d", k));
      step_cycle();
    end
  endtask

  task automatic expect_loada(input int s);
    for (int j = 0; j < 5; j++) begin
      check(ctl.a_gen_shift && ctl.lfsr_step && ctl.achar_addr == 7'(s + j) && !ctl.msg_we,
            $sformatf("state load %0d", j));
      check(ctl.a_snap == (j == 4), "snapshot on the last state word");
      check(ctl.seg_load == (j == 0) && ctl.ap_clear == (j == 0), "counters reset at load");
      if (j == 0) check(ctl.wchar_addr == 7'(wbase(s)) + {3'b0, cfg.enum_word},
                        "enumerated word row");
      step_cycle();
    end
  endtask

  task automatic expect_prew(input int s);
    for (int i = wbase(s); i < s; i++) begin
      check(ctl.w_shift && !ctl.eo_valid && !ctl.a_rnd_shift &&
            ctl.msg_addr == 4'(i - wbase(s)) && ctl.wsrc == WSRC_MSG,
            $sformatf("pre-run step %0d", i));
      step_cycle();
    end
  endtask

  // run from s; evaluate fails at step fail_at (or never if < 0)
  task automatic expect_run(input int s, input int last, input int fail_at);
    for (int i = s; i <= last; i++) begin
      pass = !(i == fail_at);
      #1;
      check(ctl.eo_valid && ctl.round == 7'(i) && ctl.w_shift && ctl.a_rnd_shift &&
            ctl.wchar_addr == 7'(i) && ctl.achar_addr == 7'(i + 5) &&
            ctl.wsrc == ((i - wbase(s) < 16) ? WSRC_MSG : WSRC_EXP) &&
            (i - wbase(s) >= 16 || ctl.msg_addr == 4'(i - wbase(s))),
            $sformatf("run step %0d", i));
      step_cycle();
      if (i == fail_at) break;
    end
    pass = 1;
  endtask

  initial begin
    int n_trial;
    start = 0; stop = 0; ap_wrap = 0; seg_wrap = 0; pass = 1;
    cfg = '{start_round: 7'd3, end_round: 7'd9, ap_en: 1'b1, seg_en: 1'b1, check_w: 1'b1,
            check_a: 1'b1, enum_word: 4'd7};
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(!busy && !found, "idle after reset");
    start = 1;
    #1;
    check(ctl.reseed_inc, "reseed counted at start");
    step_cycle();
    start = 0;
    expect_seed(3);
    expect_loada(3);
    expect_prew(3);
    expect_run(3, 9, 5);
    // NEXT: AP available
    check(ctl.trial_inc && !ctl.reseed_inc, "failed trial counted");
    step_cycle();
    check(ctl.ap_step && ctl.a_restore, "AP step restores the state");
    step_cycle();
    expect_prew(3);
    expect_run(3, 9, 4);
    // NEXT: AP exhausted, segmented counter available
    ap_wrap = 1;
    step_cycle();
    check(ctl.seg_step && ctl.msg_we && ctl.wsrc == WSRC_SEG && ctl.msg_addr == 4'd7 &&
          ctl.ap_clear && ctl.a_restore, "segmented-counter step");
    seg_wrap = 1;                      // this was the last value
    step_cycle();
    seg_wrap = 0;
    expect_prew(3);
    expect_run(3, 9, 3);
    // NEXT: both exhausted -> reseed
    #1;
    check(ctl.reseed_inc, "reseed after all enumeration modes");
    step_cycle();
    ap_wrap = 0;
    expect_seed(3);
    expect_loada(3);
    expect_prew(3);
    expect_run(3, 9, -1);
    // COMMIT
    for (int k = 0; k < 16; k++) begin
      check(ctl.msg_we && ctl.wsrc == WSRC_MSG && ctl.msg_addr == 4'(k) &&
            ctl.found_inc == (k == 0) && ctl.trial_inc == (k == 0), $sformatf("commit %0d", k));
      step_cycle();
    end
    check(!busy && found && last_round == 7'd9, "found at end step");

    // start step 0: no pre-run; stop request ends at the next trial boundary
    cfg.start_round = 7'd0; cfg.ap_en = 1'b0; cfg.seg_en = 1'b0;
    start = 1;
    step_cycle();
    start = 0;
    check(!found, "found cleared by a new start");
    expect_seed(0);
    expect_loada(0);
    stop = 1;
    step_cycle();
    stop = 0;
    n_trial = 0;
    expect_run(1, 9, 2);   // the first step already ran during the stop pulse
    check(ctl.trial_inc, "trial ends");
    step_cycle();
    check(!busy && !found, "stopped");

    // late start step 40: the stored words are W(24)..W(39)
    cfg = '{start_round: 7'd40, end_round: 7'd45, ap_en: 1'b1, seg_en: 1'b1, check_w: 1'b1,
            check_a: 1'b1, enum_word: 4'd7};
    start = 1;
    step_cycle();
    start = 0;
    expect_seed(40);
    expect_loada(40);
    expect_prew(40);
    expect_run(40, 45, 42);
    step_cycle();
    check(ctl.ap_step && ctl.a_restore, "late start: AP step");
    step_cycle();
    expect_prew(40);
    expect_run(40, 45, 40);
    ap_wrap = 1;
    step_cycle();
    check(ctl.seg_step && ctl.msg_addr == 4'd7 && ctl.wchar_addr == 7'd31,
          "late start: segmented counter on stored word 7, row 31");
    step_cycle();
    ap_wrap = 0;
    expect_prew(40);
    expect_run(40, 45, -1);
    for (int k = 0; k < 16; k++) begin
      check(ctl.msg_we && ctl.msg_addr == 4'(k), $sformatf("late start: commit %0d", k));
      step_cycle();
    end
    check(!busy && found && last_round == 7'd45, "late start: found at end step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
