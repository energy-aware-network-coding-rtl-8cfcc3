// tb_coef_lfsr: checks the coefficient LFSR.
//
// Lane 0 (x^8+x^4+x^3+x^2+1, taps on bits 7,5,4,3, seed 1) is compared with its first states worked
// out by hand; all eight lane polynomials of the encoder are then run for a
// full period and must visit all 255 nonzero values exactly once and return
// to the seed after 255 steps (maximal length). The register must hold while
// step is low and reload its seed on reset.
module tb_coef_lfsr;
  import nc_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] step;
  logic [7:0] coef [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < 8; k++) begin : g_l
    coef_lfsr #(.Q(8), .POLY(LFSR_POLYS[k]), .SEED(LFSR_SEEDS[k])) dut (
      .clk, .rst_n, .step(step[k]), .coef(coef[k]));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hand [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h11, 8'h23, 8'h47, 8'h8E, 8'h1C, 8'h38};
    bit seen [8][256];
    int unsigned model [8];
    step = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      chk(coef[k] == LFSR_SEEDS[k], $sformatf("seed lane %0d", k));
      model[k] = LFSR_SEEDS[k];
    end
    // hold
    repeat (3) @(posedge clk);
    chk(coef[0] == 8'h01, "hold while step low");
    step <= 8'hFF;
    for (int t = 0; t < 255; t++) begin
      if (t < 10) chk(coef[0] == hand[t], $sformatf("hand state %0d", t));
      for (int k = 0; k < 8; k++) begin
        chk(coef[k] == 8'(model[k]), $sformatf("lane %0d step %0d: %02h vs %02h", k, t, coef[k], model[k]));
        chk(coef[k] != 0 && !seen[k][coef[k]], $sformatf("lane %0d repeats or zero at %0d", k, t));
        seen[k][coef[k]] = 1;
        // next state: multiply by x in the lane's field
        model[k] = lfsr_next_ref(model[k], LFSR_POLYS[k], 8);
      end
      @(posedge clk); #1;
    end
    for (int k = 0; k < 8; k++) chk(coef[k] == LFSR_SEEDS[k], $sformatf("period 255 lane %0d", k));
    // only lane 3 steps
    step <= 8'h08;
    @(posedge clk); #1;
    chk(coef[0] == LFSR_SEEDS[0], "lane 0 holds while lane 3 steps");
    chk(coef[3] == 8'(lfsr_next_ref(LFSR_SEEDS[3], LFSR_POLYS[3], 8)), "lane 3 steps alone");
    step <= 8'h00;
    rst_n <= 0;
    @(posedge clk); #1;
    for (int k = 0; k < 8; k++) chk(coef[k] == LFSR_SEEDS[k], $sformatf("reset reload lane %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
