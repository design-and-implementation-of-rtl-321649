// tb_sha1_areg: checks shifting, parallel load, snapshot and restore of the
// five A registers against a queue model.
module tb_sha1_areg;
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
  logic        shift_en, load_en, snap_en, restore_en;
  logic [31:0] shift_in;
  logic [31:0] load_val [5];
  logic [31:0] a [5];
  logic [31:0] m [5];
  logic [31:0] s [5];

  sha1_areg dut (.clk, .rst_n, .shift_en, .shift_in, .load_en, .load_val, .snap_en,
                 .restore_en, .a);

  initial begin
    int op;
    logic [31:0] mn [5];
    shift_en = 0; load_en = 0; snap_en = 0; restore_en = 0; shift_in = 0;
    for (int k = 0; k < 5; k++) begin load_val[k] = 0; m[k] = 0; s[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      op = $urandom_range(0, 9);
      shift_en   = (op < 6);
      load_en    = (op == 6);
      restore_en = (op == 7);
      snap_en    = ($urandom_range(0, 7) == 0);
      shift_in   = $urandom;
      for (int k = 0; k < 5; k++) load_val[k] = $urandom;
      mn = m;
      if (load_en) mn = load_val;
      else if (restore_en) mn = s;
      else if (shift_en) begin
        for (int k = 4; k > 0; k--) mn[k] = m[k-1];
        mn[0] = shift_in;
      end
      if (snap_en) s = mn;
      m = mn;
      @(posedge clk);
      #1;
      for (int k = 0; k < 5; k++) check(a[k] == m[k], $sformatf("A reg %0d at op %0d", k, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
