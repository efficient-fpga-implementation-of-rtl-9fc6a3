// hsca_lfsr: random number generator (RNG) of the HSCA engine.
//
// The source algorithm draws its random numbers from an LFSR seeded by the
// host; the polynomial, the width and the number of shifts per clock are
// this design's choices. This is a 32-bit Galois LFSR with the primitive
// polynomial x^32 + x^22 + x^2 + x + 1 (period 2^32-1). It advances STEPS
// single-bit shifts per enabled clock (leap-forward, unrolled in
// combinational logic), so that with STEPS = 32 every output word holds 32
// fresh bits instead of a one-bit shift of the previous word.
//
// Interface: load (priority over en) copies seed into the state; a zero seed
// would lock the register, so it is replaced by the constant 32'h1. en
// advances the state. rnd is the current state, valid from the cycle after
// load. No other latency.
module hsca_lfsr #(
  parameter int unsigned STEPS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        en,
  output logic [31:0] rnd
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] state, nxt;

  always_comb begin
    nxt = state;
    for (int unsigned k = 0; k < STEPS; k++)
      nxt = nxt[0] ? ((nxt >> 1) ^ TAPS) : (nxt >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= 32'h1;
    else if (load)     state <= (seed == 32'h0) ? 32'h1 : seed;
    else if (en)       state <= nxt;
  end

  assign rnd = state;

  // The all-zero state is unreachable from a non-zero seed.
  assert property (@(posedge clk) disable iff (!rst_n) state != 32'h0);

endmodule
