// gf_mult: combinational GF(2^Q) multiplier in the standard (polynomial) basis.
//
// The product a*b mod POLY is formed in one pass of logic by unrolling the
// shift-and-add (Rijndael) algorithm: for each bit i of b, the running
// multiple a*x^i is XORed into the product when b[i] is set, and a*x^i is
// advanced to a*x^(i+1) by a left shift followed, when the bit shifted out
// was 1, by an XOR with the low Q bits of POLY. Unrolling the loop instead
// of iterating it over Q clock cycles is the architecture the source chose
// for low-voltage, low-frequency operation. The default POLY (0x11D) is this
// design's choice.
//
// Ports: a, b operands; p product. No clock: the result is valid one
// propagation delay after the operands settle.
module gf_mult #(
  parameter int         Q    = 8,
  parameter logic [Q:0] POLY = 9'h11D
) (
  input  logic [Q-1:0] a,
  input  logic [Q-1:0] b,
  output logic [Q-1:0] p
);

  always_comb begin
    logic [Q-1:0] mult;  // a * x^i mod POLY
    p    = '0;
    mult = a;
    for (int i = 0; i < Q; i++) begin
      if (b[i]) p = p ^ mult;
      mult = {mult[Q-2:0], 1'b0} ^ (mult[Q-1] ? POLY[Q-1:0] : '0);
    end
  end

endmodule
