// tb_bus_io: checks the decoded strobes, the configuration and seed
// registers, and the read multiplexer of the system-bus interface against the
// register map.
module tb_bus_io;
  import sha1_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata, seed, mem_wdata;
  logic        bus_we, bus_re, bus_rvalid;
  logic        start_p, stop_p, seed_load_p, stat_clear_p;
  search_cfg_t cfg;
  logic        wchar_we, achar_we, msg1_we, msg2_we, ap1_we, ap2_we;
  logic [6:0]  mem_row, last_round;
  cond_field_e mem_field;
  logic [3:0]  mem_word, mem_path;
  logic        busy, found;
  logic [63:0] trials, eos, reseeds, founds, n_count;
  cond_t       wchar_rdata, achar_rdata;
  word_t       msg1_rdata, msg2_rdata;

  bus_io dut (.*);

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

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    check(bus_rvalid, "rvalid");
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    bus_addr = 0; bus_wdata = 0; bus_we = 0; bus_re = 0;
    busy = 1; found = 0; last_round = 7'd42;
    trials = 64'h1111_2222_3333_4444; eos = 64'h5555_6666_7777_8888;
    reseeds = 64'h0000_0009_0000_000a; founds = 64'h3;
    n_count = 64'hdead_beef_0bad_f00d;
    wchar_rdata = '{dmask: 32'h1, dval: 32'h2, vmask: 32'h3, vval: 32'h4};
    achar_rdata = '{dmask: 32'h5, dval: 32'h6, vmask: 32'h7, vval: 32'h8};
    msg1_rdata = 32'haaaa_0001; msg2_rdata = 32'hbbbb_0002;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.start_round == 0 && cfg.end_round == 79 && cfg.check_w && cfg.check_a &&
          !cfg.ap_en && !cfg.seg_en, "configuration reset values");
    // control pulses
    bus_addr = A_CTRL; bus_wdata = 32'hf; bus_we = 1; #1;
    check(start_p && stop_p && seed_load_p && stat_clear_p, "control pulses");
    bus_addr = A_CONFIG; bus_wdata = 32'h0A0F_2B11; #1;
    check(!start_p && !stop_p, "no pulse elsewhere");
    @(negedge clk);
    check(cfg.start_round == 7'h11 && cfg.end_round == 7'h2B && cfg.ap_en && cfg.seg_en &&
          cfg.check_w && cfg.check_a && cfg.enum_word == 4'hA, "configuration fields");
    bus_addr = A_SEED; bus_wdata = 32'hcafe_f00d;
    @(negedge clk);
    check(seed == 32'hcafe_f00d, "seed register");
    // memory strobes and decoded addresses
    bus_addr = 12'h200 + 12'(4 * 79 + 2); bus_wdata = 32'h77; #1;
    check(wchar_we && !achar_we && mem_row == 7'd79 && mem_field == F_VMASK &&
          mem_wdata == 32'h77, "W-part write");
    bus_addr = 12'h400 + 12'(4 * 84 + 3); #1;
    check(achar_we && !wchar_we && mem_row == 7'd84 && mem_field == F_VVAL, "A-part write");
    bus_addr = 12'h60B; #1;
    check(msg1_we && !msg2_we && mem_word == 4'hB, "message 1 write");
    bus_addr = 12'h61C; #1;
    check(msg2_we && !msg1_we && mem_word == 4'hC, "message 2 write");
    bus_addr = 12'h835; #1;
    check(ap1_we && !ap2_we && mem_path == 4'h3 && mem_word == 4'h5, "AP lane 1 write");
    bus_addr = 12'h9F0; #1;
    check(ap2_we && !ap1_we && mem_path == 4'hF, "AP lane 2 write");
    bus_addr = 12'hA53; #1;
    check(!wchar_we && !achar_we && !msg1_we && !msg2_we && !ap1_we && !ap2_we &&
          mem_row == 7'h29, "statistics page is read-only");
    @(negedge clk);
    bus_we = 0;
    // reads
    rd(A_CTRL, d);       check(d == 32'h1, "status");
    rd(A_CONFIG, d);     check(d == 32'h0A0F_2B11, "configuration read back");
    rd(A_SEED, d);       check(d == 32'hcafe_f00d, "seed read back");
    rd(A_ROUND, d);      check(d == 42, "round");
    rd(A_TRIALS, d);     check(d == 32'h3333_4444, "trials lo");
    rd(A_TRIALS + 1, d); check(d == 32'h1111_2222, "trials hi");
    rd(A_EOS + 1, d);    check(d == 32'h5555_6666, "EO hi");
    rd(A_RESEEDS, d);    check(d == 32'ha, "reseeds lo");
    rd(A_FOUNDS, d);     check(d == 32'h3, "founds lo");
    rd(12'h201, d);      check(d == 32'h2, "W-part field dval");
    rd(12'h3FE, d);      check(d == 32'h3, "W-part field vmask");
    rd(12'h403, d);      check(d == 32'h8, "A-part field vval");
    rd(12'h600, d);      check(d == 32'haaaa_0001, "message 1");
    rd(12'h612, d);      check(d == 32'hbbbb_0002, "message 2");
    rd(12'hA10, d);      check(d == 32'h0bad_f00d, "N lo");
    rd(12'hA11, d);      check(d == 32'hdead_beef, "N hi");
    rd(12'hF00, d);      check(d == 32'h0, "unmapped reads zero");
    @(negedge clk);
    check(!bus_rvalid, "rvalid only after a read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
