// tb_nc_ctrl: checks the encoder sequencer with N_MAX = 8, L_MAX = 16.
//
// For a set of legal commands it checks that start is accepted only when
// ready, that lfsr_step pulses once, that lane_en enables exactly num_pkts
// lanes, that rd_addr sweeps 0..pkt_len-1 in the pkt_len cycles after the
// start, that dat_valid/first/last follow one cycle later, and that ready
// returns pkt_len+1 cycles after the start. Illegal sizes must be refused.
module tb_nc_ctrl;
  localparam int N = 8, L = 16;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] num_pkts = '0;
  logic [4:0] pkt_len = '0;
  logic ready, bad_start, lfsr_step, rd_en, dat_valid, dat_first, dat_last;
  logic [N-1:0] lane_en;
  logic [3:0] rd_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nc_ctrl #(.N_MAX(N), .L_MAX(L)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one command, checked cycle by cycle; sampling happens just after edges
  task automatic run(input int n, input int len);
    @(negedge clk);
    chk(ready, "ready before start");
    start = 1; num_pkts = 4'(n); pkt_len = 5'(len);
    #1; chk(lfsr_step && !bad_start, $sformatf("lfsr_step on accept n=%0d len=%0d", n, len));
    @(negedge clk);
    start = 0;
    for (int c = 0; c < len; c++) begin
      chk(rd_en && rd_addr == 4'(c), $sformatf("addr cycle %0d: en=%0b addr=%0d", c, rd_en, rd_addr));
      chk(!ready && !lfsr_step, "busy during sweep");
      chk(lane_en == N'((1 << n) - 1), $sformatf("lane_en %b for n=%0d", lane_en, n));
      if (c > 0) chk(dat_valid && dat_first == (c == 1) && dat_last == 0,
                     $sformatf("dat flags cycle %0d", c));
      @(negedge clk);
    end
    chk(ready && !rd_en, "ready after sweep");
    chk(dat_valid && dat_last && (dat_first == (len == 1)), "last data flags");
    @(negedge clk);
    chk(!dat_valid, "data ends");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ready && !rd_en && !dat_valid && lane_en == '0, "idle after reset");
    run(3, 5);
    run(8, 16);
    run(1, 1);
    run(5, 2);
    // illegal commands
    for (int t = 0; t < 4; t++) begin
      int n, len;
      n   = (t == 0) ? 0 : (t == 1) ? 9 : 4;
      len = (t == 2) ? 0 : (t == 3) ? 17 : 4;
      @(negedge clk);
      start = 1; num_pkts = 4'(n); pkt_len = 5'(len);
      #1; chk(bad_start && !lfsr_step, $sformatf("illegal n=%0d len=%0d flagged", n, len));
      @(negedge clk);
      start = 0;
      chk(ready && !rd_en, "illegal command not started");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
