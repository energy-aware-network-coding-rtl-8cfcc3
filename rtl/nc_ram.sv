// nc_ram: single-port synchronous RAM holding one source packet.
//
// One port serves both writes and reads, as in the source's memory modules
// (one-port, 1 KB deep, 8 bits wide). When en is high the word at addr is
// written with wdata if we is high, or read otherwise; the read data appears
// on rdata one clock after the address (registered output) and holds while
// en is low, so an idle lane's output does not toggle. Write-first versus
// read-first behaviour is not needed: a write does not update rdata.
// Contents are not reset. The registered read is this design's choice.
module nc_ram #(
  parameter int DEPTH = 1024,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
