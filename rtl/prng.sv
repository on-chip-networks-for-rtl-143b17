// prng: 32-bit Galois LFSR, the randomness source of a PROM router.
//
// PROM needs a random number in every router to draw the next hop. This is a
// maximal-length LFSR (taps 32,22,2,1, polynomial 0x80200003) advanced every
// clock. The seed is an input, sampled during reset, so every router of a mesh
// can be given a different seed without a separate parameter set per router;
// a zero seed is replaced by a non-zero constant because the all-zero state
// would lock the register. `rnd` is the current state.
//
// The need for a per-router random source follows PROM; the generator itself
// (an LFSR, its polynomial and seeding) is this design's choice.
module prng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  output logic [31:0] rnd
);
  localparam logic [31:0] POLY = 32'h8020_0003;

  logic [31:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= (seed == 32'd0) ? 32'h1 : seed;
    else
      state <= state[0] ? ((state >> 1) ^ POLY) : (state >> 1);
  end

  assign rnd = state;

endmodule
