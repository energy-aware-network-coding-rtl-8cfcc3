// nc_ctrl: sequencer of the network coding encoder.
//
// One start command produces one coded packet. When start is seen in the
// idle state (ready high) with a legal generation size num_pkts (1..N_MAX)
// and packet length pkt_len (1..L_MAX), the controller
//   * pulses lfsr_step for one cycle, so every active lane draws a fresh
//     coefficient for this coded packet (one LFSR step per packet and lane),
//   * latches lane_en: lanes 0..num_pkts-1 are active, the rest stay idle
//     (their RAM, LFSR and multiplier inputs do not toggle), which is how the
//     encoder scales its energy with the generation size,
//   * then sweeps rd_addr from 0 to pkt_len-1, one symbol address per cycle.
// dat_valid, dat_first and dat_last follow rd_en by one cycle, aligned with
// the RAMs' registered read data. A start with an illegal size is not
// accepted (ready stays high) and is counted on bad_start for one cycle.
//
// Timing: start accepted in cycle S, addresses in cycles S+1 .. S+pkt_len,
// data aligned flags in S+2 .. S+pkt_len+1. ready returns in cycle
// S+pkt_len+1, so back-to-back packets leave a single idle cycle between
// address sweeps. The source gives the lanes, their gating and the
// one-symbol-per-cycle rate; the command interface is this design's own.
module nc_ctrl #(
  parameter int N_MAX = 8,
  parameter int L_MAX = 1024,
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int LW   = $clog2(L_MAX + 1),
  localparam int AW   = $clog2(L_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NW-1:0]    num_pkts,
  input  logic [LW-1:0]    pkt_len,
  output logic             ready,
  output logic             bad_start,
  output logic             lfsr_step,
  output logic [N_MAX-1:0] lane_en,
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr,
  output logic             dat_valid,
  output logic             dat_first,
  output logic             dat_last
);

  typedef enum logic [0:0] {IDLE, RUN} state_t;

  state_t        state;
  logic [AW-1:0] last_addr;
  logic          legal;
  logic          accept;

  assign legal  = (num_pkts >= NW'(1)) && (num_pkts <= NW'(N_MAX)) &&
                  (pkt_len  >= LW'(1)) && (pkt_len  <= LW'(L_MAX));
  assign ready  = (state == IDLE);
  assign accept = ready && start && legal;

  assign lfsr_step = accept;
  assign bad_start = ready && start && !legal;
  assign rd_en     = (state == RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      rd_addr   <= '0;
      last_addr <= '0;
      lane_en   <= '0;
    end else begin
      case (state)
        IDLE: if (accept) begin
          state     <= RUN;
          rd_addr   <= '0;
          last_addr <= AW'(pkt_len - LW'(1));
          for (int k = 0; k < N_MAX; k++) lane_en[k] <= (k < int'(num_pkts));
        end
        RUN: begin
          if (rd_addr == last_addr) state <= IDLE;
          else                      rd_addr <= rd_addr + AW'(1);
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Flags aligned with the RAMs' registered read data.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dat_valid <= 1'b0;
      dat_first <= 1'b0;
      dat_last  <= 1'b0;
    end else begin
      dat_valid <= rd_en;
      dat_first <= rd_en && (rd_addr == '0);
      dat_last  <= rd_en && (rd_addr == last_addr);
    end
  end

endmodule
