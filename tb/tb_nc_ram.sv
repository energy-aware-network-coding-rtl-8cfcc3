// tb_nc_ram: checks the one-port packet RAM at its full 1024 x 8 size.
//
// Every word is written with a random value, then read back in random
// order; read data must appear exactly one clock after the address. It must
// hold while en is low, and a write must not change rdata.
module tb_nc_ram;
  logic clk = 0, en = 0, we = 0;
  logic [9:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nc_ram #(.DEPTH(1024), .W(8)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      ref_mem[i] = 8'($urandom);
      en = 1; we = 1; addr = 10'(i); wdata = ref_mem[i];
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = (t < 1024) ? t : int'($urandom_range(1023));
      addr = 10'(a);
      @(negedge clk);
      chk(rdata == ref_mem[a], $sformatf("read %0d: %02h vs %02h", a, rdata, ref_mem[a]));
    end
    held = rdata;
    en = 0; addr = 10'd5;
    repeat (3) @(negedge clk);
    chk(rdata == held, "hold while disabled");
    en = 1; we = 1; addr = 10'd7; wdata = ~ref_mem[7];
    @(negedge clk);
    chk(rdata == held, "write leaves rdata");
    ref_mem[7] = ~ref_mem[7];
    we = 0;
    @(negedge clk);
    chk(rdata == ref_mem[7], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
