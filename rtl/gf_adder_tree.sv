// gf_adder_tree: sums N elements of GF(2^Q) with a balanced tree of adders.
//
// Addition in GF(2^Q) is a Q-bit XOR with no carries, so each adder of the
// tree is one XOR gate per bit. The inputs are padded with zeros to the next
// power of two and combined pairwise level by level; for N = 8 that is four
// adders, then two, then one, giving a depth of log2(N) XOR gates. The tree
// shape follows the encoder's block diagram; the padding is this design's
// way of handling an N that is not a power of two.
//
// Ports: in[N] addends, sum their GF sum. Purely combinational.
module gf_adder_tree #(
  parameter int Q = 8,
  parameter int N = 8
) (
  input  logic [Q-1:0] in [N],
  output logic [Q-1:0] sum
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int P      = 1 << LEVELS;

  logic [Q-1:0] node [LEVELS+1][P];

  always_comb begin
    for (int i = 0; i < P; i++) node[0][i] = (i < N) ? in[i] : '0;
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < P; i++) begin
        if (i < (P >> (l + 1))) node[l+1][i] = node[l][2*i] ^ node[l][2*i+1];
        else                    node[l+1][i] = '0;
      end
    end
  end

  assign sum = node[LEVELS][0];

endmodule
