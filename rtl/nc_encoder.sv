// nc_encoder: energy-aware random linear network coding encoder over GF(2^8).
//
// The encoder stores a generation of up to N_MAX source packets, each of up
// to L_MAX Q-bit symbols, in N_MAX one-port RAMs (one packet per RAM). For
// each coded packet, lane k draws a pseudo-random coefficient c_k from its own
// maximal-length LFSR, and every cycle the encoder reads symbol j of all
// packets in parallel, multiplies each by its coefficient in a combinational
// GF(2^Q) multiplier and sums the products in a tree of GF adders:
//     out_data[j] = c_0*p_0[j] + c_1*p_1[j] + ... + c_{n-1}*p_{n-1}[j].
// One coded symbol leaves per cycle, so n*Q bits of source data are processed
// per cycle (8 bytes per cycle at n = 8: 80 MB/s at 10 MHz). The coefficient
// vector goes out with every symbol so a receiver can decode.
//
// Lanes at or above num_pkts are idle: their RAM is not enabled, their LFSR
// does not step, and AND gates force their multiplier operands to zero so
// stale RAM data and coefficients neither toggle the datapath nor reach the
// sum. These enables stand for the clock gating and the operand gating of the
// source design; a gate-level flow would map them to clock-gating cells.
//
// Interface
//   Loading: while ready is high, wr_en writes wr_data to symbol wr_addr of
//   packet wr_pkt. Writes while a packet is being encoded are not performed.
//   Encoding: start with num_pkts (1..N_MAX) and pkt_len (1..L_MAX) while
//   ready is high produces one coded packet. out_valid is high for pkt_len
//   consecutive cycles, with out_first and out_last on its first and last
//   symbol; out_coef holds the packet's coefficients (zero for idle lanes).
//   There is no back-pressure: the consumer takes one symbol per cycle.
// Timing: start accepted in cycle S gives out_valid in cycles S+3 ..
//   S+pkt_len+2 (address, RAM read, registered output). Reset is active-low
//   and synchronous; it reseeds the LFSRs but does not clear the RAMs.
//
// From the source: GF(2^8), 8 lanes, 1 KB one-port byte-wide RAMs, q-bit
// LFSRs, single-cycle GF multipliers, tree of GF adders, gating of idle lanes
// and of the LFSR outputs. This design's own: the field and LFSR polynomials,
// the seeds, the command and output interface and the pipeline registers.
module nc_encoder
  import nc_pkg::*;
#(
  parameter int N    = nc_pkg::N_MAX,
  parameter int L    = nc_pkg::L_MAX,
  localparam int NW  = $clog2(N + 1),
  localparam int LW  = $clog2(L + 1),
  localparam int AW  = $clog2(L),
  localparam int PW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // packet loading
  input  logic         wr_en,
  input  logic [PW-1:0] wr_pkt,
  input  logic [AW-1:0] wr_addr,
  input  sym_t         wr_data,
  // encoding command
  input  logic         start,
  input  logic [NW-1:0] num_pkts,
  input  logic [LW-1:0] pkt_len,
  output logic         ready,
  output logic         bad_start,
  // coded packet stream
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output sym_t         out_data,
  output sym_t         out_coef [N]
);

  logic          lfsr_step;
  logic [N-1:0]  lane_en;
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  logic          dat_valid, dat_first, dat_last;

  nc_ctrl #(.N_MAX(N), .L_MAX(L)) u_ctrl (
    .clk, .rst_n, .start, .num_pkts, .pkt_len, .ready, .bad_start,
    .lfsr_step, .lane_en, .rd_en, .rd_addr, .dat_valid, .dat_first, .dat_last
  );

  sym_t ram_q  [N];
  sym_t coef   [N];
  sym_t coef_g [N];
  sym_t data_g [N];
  sym_t prod   [N];
  sym_t sum;

  for (genvar k = 0; k < N; k++) begin : g_lane
    logic ram_wr, ram_en;
    assign ram_wr = wr_en && ready && (wr_pkt == PW'(k));
    assign ram_en = ram_wr || (rd_en && lane_en[k]);

    nc_ram #(.DEPTH(L), .W(Q)) u_ram (
      .clk, .en(ram_en), .we(ram_wr),
      .addr(ram_wr ? wr_addr : rd_addr), .wdata(wr_data), .rdata(ram_q[k])
    );

    coef_lfsr #(
      .Q(Q), .POLY(LFSR_POLYS[k % 8]),
      .SEED(LFSR_SEEDS[k % 8] ^ sym_t'(k / 8))
    ) u_lfsr (
      .clk, .rst_n, .step(lfsr_step && (k < int'(num_pkts))), .coef(coef[k])
    );

    // Operand gating between the lane sources and the GF arithmetic.
    assign coef_g[k] = coef[k]  & {Q{lane_en[k]}};
    assign data_g[k] = ram_q[k] & {Q{lane_en[k] && dat_valid}};

    gf_mult #(.Q(Q), .POLY(GF_POLY)) u_mult (
      .a(data_g[k]), .b(coef_g[k]), .p(prod[k])
    );
  end

  gf_adder_tree #(.Q(Q), .N(N)) u_tree (.in(prod), .sum);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < N; k++) out_coef[k] <= '0;
    end else begin
      out_valid <= dat_valid;
      out_first <= dat_first;
      out_last  <= dat_last;
      if (dat_valid) begin
        out_data <= sum;
        for (int k = 0; k < N; k++) out_coef[k] <= coef_g[k];
      end
    end
  end

  // A write is only performed while the encoder is idle.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> ready)
    else $warning("nc_encoder: write while encoding is ignored");

endmodule
