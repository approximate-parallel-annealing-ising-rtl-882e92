// apaim_rng: random number generator shared by two spins.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) that advances
// every clock. The low half of the state is the random number of the first
// spin, the high half that of the second. The machine has one generator per
// two spins; the generator type and its seed are this design's choice. SEED
// must be nonzero.
module apaim_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rnd0,
  output logic [15:0] rnd1
);

  logic [31:0] x, x1, x2, x3;

  always_comb begin
    x1 = x ^ (x << 13);
    x2 = x1 ^ (x1 >> 17);
    x3 = x2 ^ (x2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x <= SEED;
    else        x <= x3;
  end

  assign rnd0 = x[15:0];
  assign rnd1 = x[31:16];

endmodule
