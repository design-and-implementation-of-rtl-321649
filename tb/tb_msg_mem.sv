// tb_msg_mem: random writes and reads of the sixteen-word message memory
// against a model.
module tb_msg_mem;
  import sha1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic       we;
  logic [3:0] waddr, raddr;
  word_t      wdata, rdata;
  word_t      m [16];

  msg_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      we = 1; waddr = 4'(k); wdata = $urandom; m[k] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = $urandom; raddr = 4'($urandom);
      #1;
      check(rdata == m[raddr], $sformatf("word %0d", raddr));
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
