// tb_gen_w: checks every source of Generate W for both lanes against
// bit-level expectations: random words obey the value conditions and the two
// lanes differ exactly by the required difference; stored words get the AP
// flips; segmented words change only free bits.
module tb_gen_w;
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
  wsrc_e src;
  word_t r, msg1, msg2, flip, expanded, seg, w1, w2;
  cond_t c;

  gen_w #(.LANE2(1'b0)) dut1 (.src, .r, .c, .msg(msg1), .flip, .expanded, .seg, .w(w1));
  gen_w #(.LANE2(1'b1)) dut2 (.src, .r, .c, .msg(msg2), .flip, .expanded, .seg, .w(w2));

  initial begin
    word_t diff;
    for (int n = 0; n < 500; n++) begin
      c.dmask = $urandom; c.dval = $urandom; c.vmask = $urandom; c.vval = $urandom;
      diff = c.dmask & c.dval;
      r = $urandom; flip = $urandom; expanded = $urandom; seg = $urandom & ~c.vmask;
      msg1 = $urandom; msg2 = msg1 ^ diff;
      src = WSRC_RAND; #1;
      check((w1 & c.vmask) == (c.vval & c.vmask), "RAND lane1 fixed bits");
      check((w1 & ~c.vmask) == (r & ~c.vmask), "RAND lane1 free bits from r");
      check((w1 ^ w2) == diff, "RAND lane difference");
      src = WSRC_MSG; #1;
      check(w1 == (msg1 ^ flip) && w2 == (msg2 ^ flip), "MSG with flips");
      src = WSRC_EXP; #1;
      check(w1 == expanded && w2 == expanded, "EXP");
      src = WSRC_SEG; #1;
      check((w1 & c.vmask) == (msg1 & c.vmask), "SEG keeps fixed bits");
      check((w1 & ~c.vmask) == seg, "SEG free bits from counter");
      check((w1 ^ w2) == diff, "SEG lane difference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
