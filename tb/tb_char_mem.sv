// tb_char_mem: writes random fields into random rows and reads rows back
// against a model; rows beyond DEPTH read as zero and ignore writes.
module tb_char_mem;
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
  localparam int D = 85;
  logic        we;
  logic [6:0]  waddr, raddr;
  cond_field_e wfield;
  word_t       wdata;
  cond_t       rdata;
  cond_t       m [D];

  char_mem #(.DEPTH(D), .AW(7)) dut (.clk, .we, .waddr, .wfield, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = 0; raddr = 0; wfield = F_DMASK; wdata = 0;
    rst_n = 1;
    // fill every field of every row
    for (int r = 0; r < D; r++) begin
      for (int f = 0; f < 4; f++) begin
        @(negedge clk);
        we = 1; waddr = 7'(r); wfield = cond_field_e'(f); wdata = $urandom;
        case (f)
          0: m[r].dmask = wdata;
          1: m[r].dval  = wdata;
          2: m[r].vmask = wdata;
          default: m[r].vval = wdata;
        endcase
      end
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 7'($urandom_range(0, 127)); wfield = cond_field_e'($urandom_range(0, 3));
      wdata = $urandom;
      raddr = 7'($urandom_range(0, 127));
      #1;
      if (raddr < D) check(rdata == m[raddr], $sformatf("row %0d", raddr));
      else           check(rdata == '0, "out-of-range row reads zero");
      if (we && waddr < D) begin
        case (wfield)
          F_DMASK: m[waddr].dmask = wdata;
          F_DVAL:  m[waddr].dval  = wdata;
          F_VMASK: m[waddr].vmask = wdata;
          default: m[waddr].vval  = wdata;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
