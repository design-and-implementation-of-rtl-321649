// tb_gen_a: random A words of both lanes obey the value conditions and differ
// by exactly the required difference.
module tb_gen_a;
  import sha1_pkg::*;
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
  word_t r, a1, a2;
  cond_t c;

  gen_a #(.LANE2(1'b0)) dut1 (.r, .c, .a(a1));
  gen_a #(.LANE2(1'b1)) dut2 (.r, .c, .a(a2));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      c.dmask = $urandom; c.dval = $urandom; c.vmask = $urandom; c.vval = $urandom;
      r = $urandom; #1;
      check((a1 & c.vmask) == (c.vval & c.vmask), "fixed bits");
      check((a1 & ~c.vmask) == (r & ~c.vmask), "free bits random");
      check((a1 ^ a2) == (c.dmask & c.dval), "difference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
