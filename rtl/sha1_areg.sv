// sha1_areg: the group of registers holding the last five A words of a lane,
// a[0] = A(i) (newest) ... a[4] = A(i-4).
//
// shift_en shifts shift_in into a[0] (a new A word from the round function
// or from Generate A). load_en loads all five words at once (used by the hash
// core to start from a chaining value). snap_en copies the value the register
// takes at this edge into a snapshot, and restore_en reloads the snapshot, so
// that the search can retry the same reconstructed state with another
// message. Priority: load_en, restore_en, shift_en. Snapshot and restore are
// this design's additions for repeated trials from one state.
module sha1_areg
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_en,
  input  word_t shift_in,
  input  logic  load_en,
  input  word_t load_val [5],
  input  logic  snap_en,
  input  logic  restore_en,
  output word_t a [5]
);
  word_t snap [5];
  word_t a_nx [5];

  always_comb begin
    for (int k = 0; k < 5; k++) a_nx[k] = a[k];
    if (load_en) begin
      for (int k = 0; k < 5; k++) a_nx[k] = load_val[k];
    end else if (restore_en) begin
      for (int k = 0; k < 5; k++) a_nx[k] = snap[k];
    end else if (shift_en) begin
      a_nx[0] = shift_in;
      for (int k = 1; k < 5; k++) a_nx[k] = a[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 5; k++) begin
        a[k]    <= '0;
        snap[k] <= '0;
      end
    end else begin
      for (int k = 0; k < 5; k++) a[k] <= a_nx[k];
      if (snap_en) begin
        for (int k = 0; k < 5; k++) snap[k] <= a_nx[k];
      end
    end
  end
endmodule
