// stat_counters: statistics of the collision search.
//
// One CW-bit counter per step counts how often that step was executed
// (N(i) of the performance model), plus totals: elementary operations
// (steps executed, one per cycle), trials (candidate pairs tried), reseeds
// (fresh random messages) and pairs found. clear zeroes everything. The
// per-step counter of rd_round is read asynchronously.
module stat_counters #(
  parameter int unsigned NR = 80,
  parameter int unsigned CW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          eo_valid,
  input  logic [6:0]    eo_round,
  input  logic          trial_inc,
  input  logic          reseed_inc,
  input  logic          found_inc,
  input  logic [6:0]    rd_round,
  output logic [CW-1:0] n_count,
  output logic [CW-1:0] eo_total,
  output logic [CW-1:0] trials,
  output logic [CW-1:0] reseeds,
  output logic [CW-1:0] founds
);
  logic [CW-1:0] n [NR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NR; k++) n[k] <= '0;
      eo_total <= '0;
      trials   <= '0;
      reseeds  <= '0;
      founds   <= '0;
    end else if (clear) begin
      for (int k = 0; k < NR; k++) n[k] <= '0;
      eo_total <= '0;
      trials   <= '0;
      reseeds  <= '0;
      founds   <= '0;
    end else begin
      if (eo_valid && eo_round < 7'(NR)) begin
        n[eo_round] <= n[eo_round] + 1'b1;
        eo_total    <= eo_total + 1'b1;
      end
      if (trial_inc)  trials  <= trials + 1'b1;
      if (reseed_inc) reseeds <= reseeds + 1'b1;
      if (found_inc)  founds  <= founds + 1'b1;
    end
  end

  assign n_count = (rd_round < 7'(NR)) ? n[rd_round] : '0;
endmodule
