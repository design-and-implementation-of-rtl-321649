// tb_sha1_wexp: shifts the sixteen words of random blocks into the expansion
// register and checks w_expanded against the reference schedule for all
// steps 16..79, and the register contents.
module tb_sha1_wexp;
  import sha1_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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
  logic        shift_en;
  logic [31:0] w_in, w_expanded;
  logic [31:0] w [16];

  sha1_wexp dut (.clk, .rst_n, .shift_en, .w_in, .w, .w_expanded);

  initial begin
    logic [511:0] blk;
    logic [31:0]  ws [80];
    shift_en = 0; w_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 16; k++) blk[32*k +: 32] = $urandom;
      r_schedule(blk, ws);
      for (int t = 0; t < 80; t++) begin
        @(negedge clk);
        if (t >= 16) check(w_expanded == ws[t], $sformatf("W(%0d)", t));
        w_in = (t < 16) ? ws[t] : w_expanded;
        shift_en = 1;
        @(negedge clk);
        shift_en = 0;
        check(w[0] == ws[t], $sformatf("newest word after step %0d", t));
        if (t >= 15) check(w[15] == ws[t-15], $sformatf("oldest word after step %0d", t));
      end
    end
    // hold without shift_en
    @(negedge clk);
    w_in = 32'hdeadbeef;
    @(negedge clk);
    check(w[0] == ws[79], "register holds without shift_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
