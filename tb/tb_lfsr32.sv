// tb_lfsr32: compares the word sequence with a bit-serial Galois LFSR model,
// checks seeding (including the zero seed) and that the state does not come
// back to the seed within the run.
module tb_lfsr32;
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
  logic        seed_load, step_en;
  logic [31:0] seed, q;

  lfsr32 dut (.clk, .rst_n, .seed_load, .seed, .step_en, .q);

  function automatic logic [31:0] model_step(input logic [31:0] s);
    for (int b = 0; b < 32; b++) begin
      if (s[0]) s = (s >> 1) ^ 32'h80200003;
      else      s = s >> 1;
    end
    return s;
  endfunction

  initial begin
    logic [31:0] m, s0;
    seed_load = 0; step_en = 0; seed = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 32'h1, "reset value");
    seed = 32'h0; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    check(q == 32'h1, "zero seed replaced");
    seed = 32'hace1_2468; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    check(q == 32'hace1_2468, "seed loaded");
    m = q; s0 = q;
    for (int n = 0; n < 3000; n++) begin
      step_en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (step_en) m = model_step(m);
      check(q == m, $sformatf("word %0d", n));
      if (step_en) check(q != s0, "no early repeat");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
