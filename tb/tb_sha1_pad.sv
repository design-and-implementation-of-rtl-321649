// tb_sha1_pad: checks the message padder against a byte-level model of
// SHA-1 padding. Messages of every length class (empty, short, 55/56/63/64
// bytes in the last chunk, several chunks) are fed as 512-bit chunks with
// random gaps on the input and random back-pressure on the output. Every
// padded block is compared with the model, together with its first/last
// flags, and the number of extra length blocks is counted.
module tb_sha1_pad;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         in_valid, in_last, in_ready, out_valid, out_first, out_last, out_ready;
  logic [511:0] in_data, out_blk;
  logic [6:0]   in_bytes;

  sha1_pad dut (.clk, .rst_n, .in_valid, .in_data, .in_last, .in_bytes, .in_ready, .out_valid,
                .out_blk, .out_first, .out_last, .out_ready);

  // model: message bytes, then 0x80, zeros up to 56 mod 64, 64-bit bit length
  logic [511:0] exp_q [$];
  bit           exp_first [$];
  bit           exp_last [$];
  int           n_extra = 0;

  task automatic model(input byte unsigned m [$]);
    byte unsigned p [$];
    longint unsigned bits;
    int nb;
    bits = 64'(m.size()) * 8;
    p = m;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int k = 7; k >= 0; k--) p.push_back(8'(bits >> (8 * k)));
    nb = p.size() / 64;
    if (nb > ((m.size() == 0) ? 1 : (m.size() + 63) / 64)) n_extra++;
    for (int b = 0; b < nb; b++) begin
      logic [511:0] blk;
      for (int j = 0; j < 64; j++) blk[511 - 8*j -: 8] = p[64*b + j];
      exp_q.push_back(blk);
      exp_first.push_back(b == 0);
      exp_last.push_back(b == nb - 1);
    end
  endtask

  // drive one message as chunks; garbage in the unused bytes of the last one
  task automatic send(input byte unsigned m [$]);
    int nchunk;
    nchunk = (m.size() == 0) ? 1 : (m.size() + 63) / 64;
    model(m);
    for (int c = 0; c < nchunk; c++) begin
      int nbytes;
      nbytes = (c == nchunk - 1) ? m.size() - 64 * c : 64;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                 $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < nbytes; j++) in_data[511 - 8*j -: 8] = m[64*c + j];
      in_last  = (c == nchunk - 1);
      in_bytes = 7'(nbytes);
      in_valid = 1;
      // in_ready is stable from the falling edge to the next rising edge
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  // output side: random ready, compare every accepted block
  int n_out = 0;
  initial out_ready = 0;
  always @(posedge clk) begin
    #2;
    out_ready = ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (exp_q.size() == 0) begin
        check(0, "block with none expected");
      end else begin
        check(out_blk == exp_q[0], $sformatf("padded block %0d", n_out));
        check(out_first == exp_first[0] && out_last == exp_last[0],
              $sformatf("first/last flags of block %0d", n_out));
        void'(exp_q.pop_front());
        void'(exp_first.pop_front());
        void'(exp_last.pop_front());
      end
      n_out++;
    end
  end

  initial begin
    byte unsigned m [$];
    int lens [$];
    in_valid = 0; in_last = 0; in_bytes = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // lengths at every boundary of the padding rule, then random ones
    lens = '{0, 3, 55, 56, 63, 64, 65, 119, 120, 127, 128, 129, 183, 184, 192};
    for (int r = 0; r < 60; r++) lens.push_back($urandom_range(0, 400));
    foreach (lens[i]) begin
      m = {};
      for (int j = 0; j < lens[i]; j++) m.push_back(8'($urandom));
      send(m);
    end
    while (exp_q.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
    check(exp_q.size() == 0, "every expected block came out");
    check(n_extra >= 6, $sformatf("extra length blocks happened (%0d)", n_extra));
    $display("blocks out %0d, extra length blocks %0d", n_out, n_extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
