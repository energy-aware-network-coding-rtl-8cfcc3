// tb_gf_adder_tree: checks the GF adder tree with 8 inputs (the encoder's
// size) and with 5 inputs (zero padding of a tree that is not a power of
// two) against a sequential XOR of the inputs, for random and edge values.
module tb_gf_adder_tree;
  logic [7:0] in8 [8];
  logic [7:0] in5 [5];
  logic [7:0] s8, s5;
  int checks = 0, failures = 0;

  gf_adder_tree #(.Q(8), .N(8)) dut8 (.in(in8), .sum(s8));
  gf_adder_tree #(.Q(8), .N(5)) dut5 (.in(in5), .sum(s5));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e8, e5;
    for (int t = 0; t < 2000; t++) begin
      e8 = '0; e5 = '0;
      for (int i = 0; i < 8; i++) begin
        in8[i] = (t < 8) ? ((i == t) ? 8'hFF : 8'h00) : 8'($urandom);
        e8 ^= in8[i];
      end
      for (int i = 0; i < 5; i++) begin
        in5[i] = 8'($urandom);
        e5 ^= in5[i];
      end
      #1;
      checks++; if (s8 !== e8) begin failures++; $display("FAIL N=8 t=%0d %02h vs %02h", t, s8, e8); end
      checks++; if (s5 !== e5) begin failures++; $display("FAIL N=5 t=%0d %02h vs %02h", t, s5, e5); end
    end
    // a value added to itself cancels
    for (int i = 0; i < 8; i++) in8[i] = 8'h5C;
    #1; checks++; if (s8 !== 8'h00) begin failures++; $display("FAIL cancel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
