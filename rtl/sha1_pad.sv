// sha1_pad: message padder in front of the SHA-1 hash core. It turns a
// message given as 512-bit chunks into the padded 512-bit blocks the core
// hashes.
//
// SHA-1 padding appends one 1 bit, then zeros, then the message length in
// bits as a 64-bit big-endian number, so that the padded length is a
// multiple of 512 bits. Full chunks pass straight through. The last chunk
// carries in_bytes = 0..64 valid bytes, byte j at in_data[511-8j -: 8]; the
// padder puts 0x80 after them, clears the rest and, when at least eight
// bytes are left (in_bytes <= 55), ends the block with the length. When the
// length does not fit (56..64 bytes), one extra block follows that holds
// only zeros and the length (and the 0x80 byte too, for in_bytes = 64).
// The length counter is 64 bits wide: messages shorter than 2^64 bits.
//
// Interface: valid/ready on both sides. in_ready = out_ready except while
// the extra block is out, so a chunk takes no extra cycles and the padder
// adds no latency. out_first marks the first block of a message (it drives
// the core's init) and out_last its final padded block. The message is
// restarted after the last block, or by reset.
// The padding rule follows the SHA-1 standard; the chunk interface is this
// design's choice.
module sha1_pad
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [511:0] in_data,
  input  logic         in_last,
  input  logic [6:0]   in_bytes,
  output logic         in_ready,
  output logic         out_valid,
  output logic [511:0] out_blk,
  output logic         out_first,
  output logic         out_last,
  input  logic         out_ready
);
  logic        extra;          // the extra length block is being offered
  logic        extra_mark;     // it starts with the 0x80 byte
  logic        first;          // next block out is the first of a message
  logic [63:0] len_bits;       // message bits before the current chunk
  logic [63:0] total_bits;     // length of the message if this chunk is last
  logic [511:0] padded;
  logic        fits;           // the length fits into the last chunk's block

  assign total_bits = len_bits + ((in_bytes > 7'd64) ? 64'd512 : {54'd0, in_bytes, 3'b000});
  assign fits       = (in_bytes <= 7'd55);

  // data bytes kept, 0x80 after them, then zeros; the length goes into the
  // last eight bytes when it fits
  always_comb begin
    padded = '0;
    for (int j = 0; j < 64; j++) begin
      if (7'(j) < in_bytes)       padded[511 - 8*j -: 8] = in_data[511 - 8*j -: 8];
      else if (7'(j) == in_bytes) padded[511 - 8*j -: 8] = 8'h80;
    end
    if (fits) padded[63:0] = total_bits;
  end

  always_comb begin
    if (extra) begin
      in_ready  = 1'b0;
      out_valid = 1'b1;
      out_blk   = {extra_mark, 447'd0, len_bits};
      out_last  = 1'b1;
    end else begin
      in_ready  = out_ready;
      out_valid = in_valid;
      out_blk   = in_last ? padded : in_data;
      out_last  = in_last && fits;
    end
  end
  assign out_first = first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      extra      <= 1'b0;
      extra_mark <= 1'b0;
      first      <= 1'b1;
      len_bits   <= '0;
    end else if (out_valid && out_ready) begin
      first <= out_last;
      if (extra) begin
        extra    <= 1'b0;
        len_bits <= '0;
      end else if (in_last) begin
        if (fits) begin
          len_bits <= '0;
        end else begin
          extra      <= 1'b1;
          extra_mark <= (in_bytes >= 7'd64);
          len_bits   <= total_bits;
        end
      end else begin
        len_bits <= len_bits + 64'd512;
      end
    end
  end

  // a chunk that is not the last must be full
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready && !in_last |-> in_bytes == 7'd64);
endmodule
