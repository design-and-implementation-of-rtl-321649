// tb_ap_unit: loads random auxiliary-path masks, steps through all path
// combinations and checks the flip word of every message word against the
// XOR of the selected masks; checks clear and the wrap flag.
module tb_ap_unit;
  import sha1_pkg::*;
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
  localparam int NAP = 4;
  logic       we, clear, step, wrap;
  logic [3:0] wpath, wword, word_sel;
  word_t      wdata, flip;
  logic [NAP-1:0] ctr;
  word_t      m [NAP][16];

  ap_unit #(.NAP(NAP)) dut (.clk, .rst_n, .we, .wpath, .wword, .wdata, .clear, .step,
                            .word_sel, .flip, .ctr, .wrap);

  function automatic word_t model(input int c, input int k);
    word_t f = '0;
    for (int p = 0; p < NAP; p++) if (c[p]) f ^= m[p][k];
    return f;
  endfunction

  initial begin
    we = 0; clear = 0; step = 0; wpath = 0; wword = 0; wdata = 0; word_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NAP; p++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        we = 1; wpath = 4'(p); wword = 4'(k); wdata = $urandom; m[p][k] = wdata;
      end
    end
    // a write to a path beyond NAP is ignored
    @(negedge clk);
    wpath = 4'(NAP); wword = 0; wdata = 32'hffffffff;
    @(negedge clk);
    we = 0;
    for (int c = 0; c < (1 << NAP); c++) begin
      check(ctr == NAP'(c), $sformatf("counter %0d", c));
      check(wrap == (c == (1 << NAP) - 1), $sformatf("wrap at %0d", c));
      for (int k = 0; k < 16; k++) begin
        word_sel = 4'(k); #1;
        check(flip == model(c, k), $sformatf("flip comb %0d word %0d", c, k));
      end
      @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    check(ctr == '0, "counter wrapped to zero");
    step = 1;
    @(negedge clk);
    step = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    check(ctr == '0, "clear");
    word_sel = 4'd3; #1;
    check(flip == '0, "no flip after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
