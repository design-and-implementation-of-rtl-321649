// tb_sha1_round: checks the A-form step against the textbook a..e step for
// random states, all 80 step indices, and steps chained from the initial
// value against a known digest of "abc".
module tb_sha1_round;
  import sha1_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a [5];
  logic [31:0] w, a_next;
  logic [6:0]  t;

  sha1_round dut (.a, .w, .t, .a_next);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a, ws [80], st [5];
    logic [511:0] blk;
    for (int n = 0; n < 800; n++) begin
      for (int k = 0; k < 5; k++) a[k] = $urandom;
      w = $urandom;
      t = 7'(n % 80);
      #1;
      exp_a = r_step(n % 80, a[0], a[1], r_rotl(a[2], 30), r_rotl(a[3], 30), r_rotl(a[4], 30), w);
      check(a_next == exp_a, $sformatf("random step t=%0d got %h exp %h", t, a_next, exp_a));
    end
    // "abc" padded: chain eighty steps through the DUT
    blk = {32'h61626380, {14{32'h0}}, 32'h00000018};
    r_schedule(blk, ws);
    st[0] = 32'h67452301; st[1] = 32'hefcdab89; st[2] = r_rotl(32'h98badcfe, 2);
    st[3] = r_rotl(32'h10325476, 2); st[4] = r_rotl(32'hc3d2e1f0, 2);
    for (int i = 0; i < 80; i++) begin
      a = st; w = ws[i]; t = 7'(i);
      #1;
      st[4] = st[3]; st[3] = st[2]; st[2] = st[1]; st[1] = st[0]; st[0] = a_next;
    end
    check(32'h67452301 + st[0] == 32'ha9993e36, "abc H0");
    check(32'hefcdab89 + st[1] == 32'h4706816a, "abc H1");
    check(32'h98badcfe + r_rotl(st[2], 30) == 32'hba3e2571, "abc H2");
    check(32'h10325476 + r_rotl(st[3], 30) == 32'h7850c26c, "abc H3");
    check(32'hc3d2e1f0 + r_rotl(st[4], 30) == 32'h9cd0d89d, "abc H4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
