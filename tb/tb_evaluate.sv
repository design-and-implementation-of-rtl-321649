// tb_evaluate: random pairs and conditions, some built to comply and some
// with a single violated bit, against a bit-by-bit expectation; also the
// enables of the W and A checks.
module tb_evaluate;
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
  word_t w1, w2, a1, a2;
  cond_t wc, ac;
  logic  check_w, check_a, w_ok, a_ok, pass;

  evaluate dut (.w1, .w2, .wc, .a1, .a2, .ac, .check_w, .check_a, .w_ok, .a_ok, .pass);

  function automatic bit bit_ok(input word_t x1, input word_t x2, input cond_t c);
    for (int b = 0; b < 32; b++) begin
      if (c.dmask[b] && ((x1[b] ^ x2[b]) != c.dval[b])) return 0;
      if (c.vmask[b] && (x1[b] != c.vval[b])) return 0;
    end
    return 1;
  endfunction

  function automatic void make_pair(input cond_t c, input bit bad, output word_t x1,
                                    output word_t x2);
    int b;
    x1 = ($urandom & ~c.vmask) | (c.vval & c.vmask);
    x2 = x1 ^ (c.dmask & c.dval) ^ ($urandom & ~c.dmask);
    if (bad) begin
      b = $urandom_range(0, 31);
      if (c.vmask[b]) x1[b] = ~x1[b];
      else            x2[b] = ~x2[b];
    end
  endfunction

  initial begin
    bit bw, ba;
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      wc.dmask = $urandom; wc.dval = $urandom; wc.vmask = $urandom; wc.vval = $urandom;
      ac.dmask = $urandom; ac.dval = $urandom; ac.vmask = $urandom; ac.vval = $urandom;
      bw = ($urandom_range(0, 2) == 0);
      ba = ($urandom_range(0, 2) == 0);
      make_pair(wc, bw, w1, w2);
      make_pair(ac, ba, a1, a2);
      check_w = ($urandom_range(0, 3) != 0);
      check_a = ($urandom_range(0, 3) != 0);
      #1;
      check(w_ok == bit_ok(w1, w2, wc), "W check");
      check(a_ok == bit_ok(a1, a2, ac), "A check");
      check(pass == ((bit_ok(w1, w2, wc) || !check_w) && (bit_ok(a1, a2, ac) || !check_a)),
            "pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
