// search_fsm: finite state machine that sequences the collision search of one
// building block.
//
// One trial tests one message pair from a start step s up to an end step e:
//   SEED    16 cycles: 16 new random words per lane, word k from the LFSR
//           through Generate W against W row b+k, written to both message
//           memories. b = s-16 for s > 16, else 0: for a late start the
//           memories hold the random window W(s-16)..W(s-1) itself, made
//           consistent with the characteristic. For s <= 16 they hold the
//           message words W(0)..W(15). With s > 0 the state is random too,
//           so a found pair is not an actual collision.
//   LOADA   5 cycles: random state A(s-4)..A(s) from Generate A, shifted into
//           the A registers and kept as a snapshot; the segmented counter
//           and the AP counter are reset here.
//   PREW    s-b cycles (at most 16): the stored words W(b)..W(s-1) are
//           shifted into the expansion register; no A words are computed.
//   RUN     one step per cycle from s: W(i) from Generate W, A(i+1) from the
//           round functions, checked by evaluate. A failed check ends the
//           trial; a pass at step e (or 79) is a found pair.
//   NEXT    chooses the next pair: flip the next AP combination (APSTEP), else
//           give the enumerated word its next free-bit value (SEGSTEP), else
//           reseed. A stop request ends the search here.
//   APSTEP / SEGSTEP  1 cycle each, restore the snapshot state, then PREW/RUN.
//   COMMIT  16 cycles after a found pair: the AP flips are written into the
//           message memories so the host reads the pair itself; the found
//           pair is counted in its first cycle.
// The control word ctl depends only on the state, never on the evaluate
// result of the same cycle, so the datapath has no combinational loop.
// The sequence is this design's; the document gives the blocks, the start
// from an arbitrary step with a random consistent state, the AP flips and
// one step per clock cycle.
module search_fsm
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         stop,
  input  search_cfg_t  cfg,
  input  logic         ap_wrap,
  input  logic         seg_wrap,
  input  logic         pass,
  output search_ctrl_t ctl,
  output logic         busy,
  output logic         found,
  output logic [6:0]   last_round
);
  typedef enum logic [3:0] {
    S_IDLE, S_SEED, S_LOADA, S_PREW, S_RUN, S_NEXT, S_APSTEP, S_SEGSTEP, S_COMMIT
  } state_e;

  state_e     st, st_nx;
  logic [6:0] idx, idx_nx;
  logic       stop_req, seg_last;
  logic [6:0] s_rnd, e_rnd;

  assign s_rnd = (cfg.start_round > 7'd79) ? 7'd79 : cfg.start_round;
  assign e_rnd = (cfg.end_round   > 7'd79) ? 7'd79 : cfg.end_round;
  assign busy  = (st != S_IDLE);

  // first step whose W word is held in the message memories, and the
  // current step relative to it
  logic [6:0] w_base, rel;
  assign w_base = (s_rnd > 7'd16) ? s_rnd - 7'd16 : 7'd0;
  assign rel    = idx - w_base;

  // first state of a trial once the state A(s-4)..A(s) is in place
  state_e     st_trial;
  assign st_trial = (s_rnd == 7'd0) ? S_RUN : S_PREW;

  always_comb begin
    st_nx  = st;
    idx_nx = idx;
    ctl    = '0;
    ctl.wsrc       = (rel < 7'd16) ? WSRC_MSG : WSRC_EXP;
    ctl.msg_addr   = rel[3:0];
    ctl.wchar_addr = idx;
    ctl.achar_addr = idx + 7'd5;
    ctl.round      = idx;
    unique case (st)
      S_IDLE: begin
        if (start) begin
          st_nx          = S_SEED;
          idx_nx         = '0;
          ctl.reseed_inc = 1'b1;
        end
      end
      S_SEED: begin
        ctl.wsrc       = WSRC_RAND;
        ctl.msg_addr   = idx[3:0];
        ctl.wchar_addr = w_base + idx;
        ctl.msg_we     = 1'b1;
        ctl.lfsr_step = 1'b1;
        if (idx == 7'd15) begin
          st_nx  = S_LOADA;
          idx_nx = '0;
        end else begin
          idx_nx = idx + 7'd1;
        end
      end
      S_LOADA: begin
        ctl.achar_addr  = s_rnd + idx;
        ctl.a_gen_shift = 1'b1;
        ctl.lfsr_step   = 1'b1;
        if (idx == 7'd0) begin
          ctl.wchar_addr = w_base + {3'b0, cfg.enum_word};
          ctl.seg_load   = 1'b1;
          ctl.ap_clear   = 1'b1;
        end
        if (idx == 7'd4) begin
          ctl.a_snap = 1'b1;
          st_nx      = st_trial;
          idx_nx     = w_base;
        end else begin
          idx_nx = idx + 7'd1;
        end
      end
      S_PREW: begin
        ctl.w_shift = 1'b1;
        idx_nx      = idx + 7'd1;
        if (idx + 7'd1 == s_rnd) st_nx = S_RUN;
      end
      S_RUN: begin
        ctl.w_shift     = 1'b1;
        ctl.a_rnd_shift = 1'b1;
        ctl.eo_valid    = 1'b1;
        if (!pass) begin
          st_nx = S_NEXT;
        end else if (idx == e_rnd || idx == 7'd79) begin
          st_nx         = S_COMMIT;
          idx_nx        = '0;
        end else begin
          idx_nx = idx + 7'd1;
        end
      end
      S_NEXT: begin
        ctl.trial_inc = 1'b1;
        idx_nx        = '0;
        if (stop_req || stop) begin
          st_nx = S_IDLE;
        end else if (cfg.ap_en && !ap_wrap) begin
          st_nx = S_APSTEP;
        end else if (cfg.seg_en && !seg_last) begin
          st_nx = S_SEGSTEP;
        end else begin
          st_nx          = S_SEED;
          ctl.reseed_inc = 1'b1;
        end
      end
      S_APSTEP: begin
        ctl.ap_step   = 1'b1;
        ctl.a_restore = 1'b1;
        st_nx         = st_trial;
        idx_nx        = w_base;
      end
      S_SEGSTEP: begin
        ctl.wsrc       = WSRC_SEG;
        ctl.msg_addr   = cfg.enum_word;
        ctl.wchar_addr = w_base + {3'b0, cfg.enum_word};
        ctl.msg_we     = 1'b1;
        ctl.seg_step   = 1'b1;
        ctl.ap_clear   = 1'b1;
        ctl.a_restore  = 1'b1;
        st_nx          = st_trial;
        idx_nx         = w_base;
      end
      S_COMMIT: begin
        ctl.wsrc     = WSRC_MSG;
        ctl.msg_addr = idx[3:0];
        ctl.msg_we   = 1'b1;
        if (idx == 7'd0) begin
          ctl.found_inc = 1'b1;
          ctl.trial_inc = 1'b1;
        end
        if (idx == 7'd15) begin
          ctl.ap_clear = 1'b1;
          st_nx        = S_IDLE;
        end else begin
          idx_nx = idx + 7'd1;
        end
      end
      default: st_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      idx        <= '0;
      stop_req   <= 1'b0;
      seg_last   <= 1'b0;
      found      <= 1'b0;
      last_round <= '0;
    end else begin
      st  <= st_nx;
      idx <= idx_nx;
      if (st == S_IDLE && start) begin
        stop_req <= 1'b0;
        found    <= 1'b0;
      end else if (stop && st != S_IDLE) begin
        stop_req <= 1'b1;
      end
      if (st == S_SEED)                 seg_last <= 1'b0;
      else if (st == S_SEGSTEP && seg_wrap) seg_last <= 1'b1;
      if (ctl.found_inc) found <= 1'b1;
      if (ctl.eo_valid)  last_round <= idx;
    end
  end

  // A found pair and a new trial never start in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(ctl.found_inc && ctl.reseed_inc));
endmodule
