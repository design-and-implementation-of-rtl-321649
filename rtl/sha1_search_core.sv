// sha1_search_core: basic building block of the SHA-1 collision-search
// platform. It runs two messages (lanes 1 and 2) through the SHA-1 steps side
// by side and checks after every step that the pair still follows a
// differential characteristic.
//
// Per lane: a message memory, a Generate W block, the sixteen-word
// expansion shift register with its XOR network, a Generate A block, the five
// A registers, an AP (auxiliary path) flipper and a round function. Shared:
// the W and A parts of the characteristic, the LFSR, the segmented counter,
// the evaluate block, the statistics counters, the FSM and the system-bus
// I/O. Each cycle of a trial executes one step for both lanes and evaluates
// it (one elementary operation per clock). A search may start at any step s
// from a random state that fits the characteristic; see search_fsm for the
// sequence and bus_io for the register map.
//
// The block diagram, the two-lane organisation, the memories and one step per
// cycle follow the document; the condition encoding, the bus, the LFSR, the
// trial order and the snapshot of the reconstructed state are this design's.
module sha1_search_core
  import sha1_pkg::*;
#(
  parameter int unsigned NAP = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_we,
  input  logic        bus_re,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  output logic        busy,
  output logic        found
);
  // ---------------- I/O and control
  logic        start_p, stop_p, seed_load_p, stat_clear_p;
  logic [31:0] seed;
  search_cfg_t cfg;
  logic        wchar_we, achar_we, msg1_we, msg2_we, ap1_we, ap2_we;
  logic [6:0]  mem_row;
  cond_field_e mem_field;
  logic [3:0]  mem_word, mem_path;
  logic [31:0] mem_wdata;
  logic [6:0]  last_round;
  logic [63:0] n_count, eo_total, trials, reseeds, founds;

  search_ctrl_t ctl;
  logic         pass, w_ok, a_ok, ap_wrap, ap_wrap2, seg_wrap;

  // ---------------- shared datapath
  word_t       rnd, seg_q;
  cond_t       wc, ac;
  logic [6:0]  wc_addr, ac_addr;
  logic [NAP-1:0] ap_ctr1, ap_ctr2;

  // ---------------- per-lane datapath
  word_t msg1_q, msg2_q, flip1, flip2, wgen1, wgen2, wexp1, wexp2;
  word_t agen1, agen2, anext1, anext2;
  word_t win1 [16];
  word_t win2 [16];
  word_t areg1 [5];
  word_t areg2 [5];
  word_t no_load [5];
  logic  [3:0] msg_addr;
  logic        m1_we, m2_we;
  word_t       m1_wd, m2_wd;

  assign no_load = '{default: '0};

  bus_io u_io (
    .clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata, .bus_rvalid,
    .start_p, .stop_p, .seed_load_p, .stat_clear_p, .seed, .cfg,
    .wchar_we, .achar_we, .msg1_we, .msg2_we, .ap1_we, .ap2_we,
    .mem_row, .mem_field, .mem_word, .mem_path, .mem_wdata,
    .busy, .found, .last_round, .trials, .eos(eo_total), .reseeds, .founds, .n_count,
    .wchar_rdata(wc), .achar_rdata(ac), .msg1_rdata(msg1_q), .msg2_rdata(msg2_q)
  );

  search_fsm u_fsm (
    .clk, .rst_n, .start(start_p), .stop(stop_p), .cfg, .ap_wrap, .seg_wrap, .pass,
    .ctl, .busy, .found, .last_round
  );

  lfsr32 u_lfsr (
    .clk, .rst_n, .seed_load(seed_load_p), .seed, .step_en(ctl.lfsr_step), .q(rnd)
  );

  // memory ports follow the FSM during a search and the bus otherwise
  assign wc_addr  = busy ? ctl.wchar_addr : mem_row;
  assign ac_addr  = busy ? ctl.achar_addr : mem_row;
  assign msg_addr = busy ? ctl.msg_addr   : mem_word;
  assign m1_we    = busy ? ctl.msg_we     : msg1_we;
  assign m2_we    = busy ? ctl.msg_we     : msg2_we;
  assign m1_wd    = busy ? wgen1          : mem_wdata;
  assign m2_wd    = busy ? wgen2          : mem_wdata;

  char_mem #(.DEPTH(NROUNDS), .AW(7)) u_wchar (
    .clk, .we(wchar_we && !busy), .waddr(mem_row), .wfield(mem_field), .wdata(mem_wdata),
    .raddr(wc_addr), .rdata(wc)
  );

  char_mem #(.DEPTH(NAROWS), .AW(7)) u_achar (
    .clk, .we(achar_we && !busy), .waddr(mem_row), .wfield(mem_field), .wdata(mem_wdata),
    .raddr(ac_addr), .rdata(ac)
  );

  msg_mem u_msg1 (.clk, .we(m1_we), .waddr(msg_addr), .wdata(m1_wd), .raddr(msg_addr), .rdata(msg1_q));
  msg_mem u_msg2 (.clk, .we(m2_we), .waddr(msg_addr), .wdata(m2_wd), .raddr(msg_addr), .rdata(msg2_q));

  ap_unit #(.NAP(NAP)) u_ap1 (
    .clk, .rst_n, .we(ap1_we && !busy), .wpath(mem_path), .wword(mem_word), .wdata(mem_wdata),
    .clear(ctl.ap_clear), .step(ctl.ap_step), .word_sel(ctl.msg_addr), .flip(flip1),
    .ctr(ap_ctr1), .wrap(ap_wrap)
  );

  ap_unit #(.NAP(NAP)) u_ap2 (
    .clk, .rst_n, .we(ap2_we && !busy), .wpath(mem_path), .wword(mem_word), .wdata(mem_wdata),
    .clear(ctl.ap_clear), .step(ctl.ap_step), .word_sel(ctl.msg_addr), .flip(flip2),
    .ctr(ap_ctr2), .wrap(ap_wrap2)
  );

  seg_counter #(.W(32)) u_seg (
    .clk, .rst_n, .load(ctl.seg_load), .mask_in(~wc.vmask), .step(ctl.seg_step),
    .q(seg_q), .wrap(seg_wrap)
  );

  gen_w #(.LANE2(1'b0)) u_genw1 (
    .src(ctl.wsrc), .r(rnd), .c(wc), .msg(msg1_q), .flip(flip1), .expanded(wexp1),
    .seg(seg_q), .w(wgen1)
  );
  gen_w #(.LANE2(1'b1)) u_genw2 (
    .src(ctl.wsrc), .r(rnd), .c(wc), .msg(msg2_q), .flip(flip2), .expanded(wexp2),
    .seg(seg_q), .w(wgen2)
  );

  sha1_wexp u_wexp1 (.clk, .rst_n, .shift_en(ctl.w_shift), .w_in(wgen1), .w(win1), .w_expanded(wexp1));
  sha1_wexp u_wexp2 (.clk, .rst_n, .shift_en(ctl.w_shift), .w_in(wgen2), .w(win2), .w_expanded(wexp2));

  gen_a #(.LANE2(1'b0)) u_gena1 (.r(rnd), .c(ac), .a(agen1));
  gen_a #(.LANE2(1'b1)) u_gena2 (.r(rnd), .c(ac), .a(agen2));

  sha1_areg u_areg1 (
    .clk, .rst_n, .shift_en(ctl.a_gen_shift || ctl.a_rnd_shift),
    .shift_in(ctl.a_gen_shift ? agen1 : anext1), .load_en(1'b0), .load_val(no_load),
    .snap_en(ctl.a_snap), .restore_en(ctl.a_restore), .a(areg1)
  );
  sha1_areg u_areg2 (
    .clk, .rst_n, .shift_en(ctl.a_gen_shift || ctl.a_rnd_shift),
    .shift_in(ctl.a_gen_shift ? agen2 : anext2), .load_en(1'b0), .load_val(no_load),
    .snap_en(ctl.a_snap), .restore_en(ctl.a_restore), .a(areg2)
  );

  sha1_round u_rnd1 (.a(areg1), .w(wgen1), .t(ctl.round), .a_next(anext1));
  sha1_round u_rnd2 (.a(areg2), .w(wgen2), .t(ctl.round), .a_next(anext2));

  evaluate u_eval (
    .w1(wgen1), .w2(wgen2), .wc, .a1(anext1), .a2(anext2), .ac,
    .check_w(cfg.check_w), .check_a(cfg.check_a), .w_ok, .a_ok, .pass
  );

  stat_counters #(.NR(NROUNDS), .CW(64)) u_stat (
    .clk, .rst_n, .clear(stat_clear_p), .eo_valid(ctl.eo_valid), .eo_round(ctl.round),
    .trial_inc(ctl.trial_inc), .reseed_inc(ctl.reseed_inc), .found_inc(ctl.found_inc),
    .rd_round(mem_row), .n_count, .eo_total, .trials, .reseeds, .founds
  );

  // both AP counters are driven alike and must agree
  assert property (@(posedge clk) disable iff (!rst_n) ap_ctr1 == ap_ctr2 && ap_wrap == ap_wrap2);
endmodule
