// sha1_hash: SHA-1 compression core. It hashes a padded message of 512-bit
// blocks into a 160-bit digest, one step per clock cycle.
//
// The chaining value H0..H4 starts from the standard initial value (init, or
// reset). For each block the five A registers are loaded from the chaining
// value (A(0) = H0, A(-1) = H1, A(-2..-4) = ROTL2(H2..H4)), then eighty steps
// run through the same round function, Generate W and expansion register as
// the search lanes use: W(0..15) are the block words, W(16..79) come from the
// XOR network. Finally the five new words are added word-wise to the chaining
// value (Merkle-Damgard feed-forward).
//
// Interface: blk is accepted when blk_valid and ready are both high; word 0
// of the block is blk[511:480]. digest_valid is high for one cycle, 81
// cycles after the accepting edge, with digest = {H0, H1, H2, H3, H4}; ready
// returns in the same cycle. init (while ready) restarts the chaining value
// at the initial value for a new message; init together with blk_valid
// hashes that block as the first of a message. Padding is done in front of
// the core (sha1_pad).
module sha1_hash
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         blk_valid,
  input  logic [511:0] blk,
  output logic         ready,
  output logic [159:0] digest,
  output logic         digest_valid
);
  typedef enum logic [1:0] {H_IDLE, H_RUN, H_FINAL} hstate_e;

  hstate_e    st;
  logic [6:0] t;
  word_t      h [5];
  word_t      h_use [5];
  word_t      a_init [5];
  word_t      blkw [16];
  word_t      a [5];
  word_t      w_cur, w_exp, a_next;
  word_t      win [16];
  logic       accept;
  wsrc_e      wsrc;

  assign ready  = (st == H_IDLE);
  assign accept = ready && blk_valid;

  always_comb begin
    if (init) h_use = '{IV0, IV1, IV2, IV3, IV4};
    else      h_use = h;
    a_init[0] = h_use[0];
    a_init[1] = h_use[1];
    a_init[2] = rotl(h_use[2], 2);
    a_init[3] = rotl(h_use[3], 2);
    a_init[4] = rotl(h_use[4], 2);
  end

  assign wsrc = (t < 7'd16) ? WSRC_MSG : WSRC_EXP;

  gen_w #(.LANE2(1'b0)) u_genw (
    .src(wsrc), .r('0), .c('0), .msg(blkw[t[3:0]]), .flip('0), .expanded(w_exp),
    .seg('0), .w(w_cur)
  );

  sha1_wexp u_wexp (
    .clk, .rst_n, .shift_en(st == H_RUN), .w_in(w_cur), .w(win), .w_expanded(w_exp)
  );

  sha1_areg u_areg (
    .clk, .rst_n, .shift_en(st == H_RUN), .shift_in(a_next), .load_en(accept),
    .load_val(a_init), .snap_en(1'b0), .restore_en(1'b0), .a
  );

  sha1_round u_round (.a, .w(w_cur), .t, .a_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= H_IDLE;
      t            <= '0;
      h            <= '{IV0, IV1, IV2, IV3, IV4};
      digest_valid <= 1'b0;
      for (int k = 0; k < 16; k++) blkw[k] <= '0;
    end else begin
      digest_valid <= 1'b0;
      unique case (st)
        H_IDLE: begin
          if (init) h <= '{IV0, IV1, IV2, IV3, IV4};
          if (accept) begin
            for (int k = 0; k < 16; k++) blkw[k] <= blk[511 - 32*k -: 32];
            h  <= h_use;
            t  <= '0;
            st <= H_RUN;
          end
        end
        H_RUN: begin
          t <= t + 7'd1;
          if (t == 7'd79) st <= H_FINAL;
        end
        H_FINAL: begin
          h[0] <= h[0] + a[0];
          h[1] <= h[1] + a[1];
          h[2] <= h[2] + rotl(a[2], 30);
          h[3] <= h[3] + rotl(a[3], 30);
          h[4] <= h[4] + rotl(a[4], 30);
          digest_valid <= 1'b1;
          st           <= H_IDLE;
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  assign digest = {h[0], h[1], h[2], h[3], h[4]};
endmodule
