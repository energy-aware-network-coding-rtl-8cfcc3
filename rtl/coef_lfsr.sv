// coef_lfsr: Q-bit maximal-length LFSR that supplies one pseudo-random
// network coding coefficient.
//
// The register is a plain Q-bit shift register with XOR gates in its
// feedback path (Fibonacci form): on each step it shifts left by one and the
// new bit 0 is the XOR of the tapped state bits. For the primitive feedback
// polynomial POLY = x^Q + p_{Q-1} x^(Q-1) + ... + p_0, bit i holds the
// sequence element a_{t+Q-1-i}, and the new element is
//     a_{t+Q} = XOR over k of p_k * a_{t+k},
// so the tap on bit Q-1-k is coefficient p_k. The register visits all
// 2^Q - 1 nonzero values before repeating, so a coefficient is never zero.
// Consecutive coefficients share Q-1 bits and are not field multiples of one
// another, which keeps the coefficient vectors of consecutive coded packets
// independent with high probability.
//
// The source specifies a q-bit maximal-length LFSR per packet lane built as
// a shift register with extra gates in the feedback path; the polynomial and
// the reset seed are this design's choices.
//
// Ports: step advances the register by one state at the next rising clock
// edge (it doubles as the lane's clock enable: an idle lane does not toggle);
// coef is the current state. Reset (active low, synchronous) loads SEED,
// which must be nonzero.
module coef_lfsr #(
  parameter int           Q    = 8,
  parameter logic [Q:0]   POLY = 9'h11D,
  parameter logic [Q-1:0] SEED = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [Q-1:0] coef
);

  // Tap mask: bit Q-1-k is set when x^k appears in POLY.
  function automatic logic [Q-1:0] tap_mask(input logic [Q:0] poly);
    logic [Q-1:0] m;
    for (int k = 0; k < Q; k++) m[Q-1-k] = poly[k];
    return m;
  endfunction

  localparam logic [Q-1:0] TAPS = tap_mask(POLY);

  logic [Q-1:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= {state[Q-2:0], ^(state & TAPS)};
  end

  assign coef = state;

  initial assert (SEED != '0) else $error("coef_lfsr: SEED must be nonzero");

endmodule
