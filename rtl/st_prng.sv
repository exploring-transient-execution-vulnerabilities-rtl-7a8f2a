// st_prng: on-chip pseudo-random source for fresh secret tokens.
//
// A 64-bit xorshift generator (shifts 13, 7, 17). The STBPU only needs a
// low-latency source of random 64-bit tokens; the generator itself is not
// specified there, so this one is this design's choice and is not a
// cryptographic RNG. While `next` is high the state advances once per clock;
// `value` is the current state and is never zero. Reset loads SEED (a zero
// SEED is replaced by a fixed nonzero constant). A privileged `reseed` port
// lets software or an entropy source mix in fresh bits.
module st_prng #(
  parameter logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next,
  input  logic        reseed,
  input  logic [63:0] reseed_val,
  output logic [63:0] value
);
  localparam logic [63:0] SEED0 = (SEED == 64'd0) ? 64'h9E37_79B9_7F4A_7C15 : SEED;

  logic [63:0] state, x1, x2, x3, mixed;

  always_comb begin
    x1 = state ^ (state << 13);
    x2 = x1 ^ (x1 >> 7);
    x3 = x2 ^ (x2 << 17);
    mixed = state ^ reseed_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        state <= SEED0;
    else if (reseed && mixed != 64'd0) state <= mixed;
    else if (next)                     state <= x3;
  end

  assign value = state;

endmodule
