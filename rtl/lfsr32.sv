// lfsr32: linear feedback shift register that supplies the pseudorandom bits
// for message enumeration and state reconstruction.
//
// A 32-bit Galois LFSR with feedback polynomial x^32 + x^22 + x^2 + x + 1
// (mask 32'h80200003, right-shifting). Every step_en cycle it advances 32
// single-bit steps, so each cycle delivers a fresh 32-bit word on q.
// seed_load loads seed (an all-zero seed is replaced by 1, since zero is the
// lock-up state). Width and polynomial are this design's choice.
module lfsr32 #(
  parameter logic [31:0] POLY      = 32'h80200003,
  parameter logic [31:0] INIT_SEED = 32'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [31:0] seed,
  input  logic        step_en,
  output logic [31:0] q
);
  logic [31:0] nx;

  always_comb begin
    nx = q;
    for (int b = 0; b < 32; b++) begin
      nx = nx[0] ? ((nx >> 1) ^ POLY) : (nx >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= INIT_SEED;
    else if (seed_load) q <= (seed == '0) ? 32'h1 : seed;
    else if (step_en)   q <= nx;
  end
endmodule
