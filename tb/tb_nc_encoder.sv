// tb_nc_encoder: end-to-end test of the network coding encoder at its full
// size (8 lanes, 1024-symbol packets, GF(2^8)), with no parameter overridden.
//
// A driver issues start commands as soon as ready allows, so consecutive
// coded packets overlap in the pipeline; a monitor checks the output stream
// against a queue of expected packets.
//   1. Load a generation of 8 random 1 KB packets.
//   2. Encode coded packets with num_pkts = 8, pkt_len = 1024, and feed them
//      to a reference receiver that runs Gauss-Jordan elimination over
//      GF(2^8) until it holds 8 independent packets (rank 8), then compare
//      the decoded generation with the source packets. Like any random
//      linear network code, some coded packets are dependent on earlier
//      ones; the receiver skips those and the count is reported.
//   3. Encode with fewer lanes (num_pkts = 3, 1, 5) and short packets: idle
//      lanes must output zero coefficients, keep their LFSR state and not
//      affect the sum.
//   4. Issue an illegal start (refused) and a write during encoding (ignored).
// Every symbol is compared with sum_k c_k * p_k[j] from a reference GF
// multiply, every coefficient with a model of the lane LFSRs; the output must
// run one symbol per cycle with no gap, starting 3 cycles after the accepted
// start. Each mechanism is counted and must occur at least once.
module tb_nc_encoder;
  import nc_pkg::*;
  import gf_ref_pkg::*;

  localparam int N = N_MAX, L = L_MAX;
  localparam int MAX_CODED = 40;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0;
  logic [2:0] wr_pkt = '0;
  logic [9:0] wr_addr = '0;
  sym_t wr_data = '0;
  logic [3:0] num_pkts = '0;
  logic [10:0] pkt_len = '0;
  logic ready, bad_start, out_valid, out_first, out_last;
  sym_t out_data;
  sym_t out_coef [N];

  int checks = 0, failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_full_gen = 0, n_gated = 0, n_back_to_back = 0, n_bad_start = 0;
  int n_wr_ignored = 0, n_decoded = 0, n_dependent = 0;

  typedef struct {
    int   n;
    int   len;
    int   t_start;
    bit   to_rx;
    sym_t coef [N];
  } exp_pkt_t;

  exp_pkt_t exp_q [$];
  sym_t src [N][L];
  int unsigned lfsr_ref [N];
  int pkts_done = 0;

  // reference receiver: rows of [coefficients | data] in reduced echelon form
  int unsigned rx_c [N][N];
  sym_t        rx_d [N][L];
  int          rx_pivot [N];
  int          rx_rank = 0;
  int unsigned cur_c [N];
  sym_t        cur_d [L];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  nc_encoder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int k, input int len);
    for (int j = 0; j < len; j++) begin
      @(negedge clk);
      wr_en = 1; wr_pkt = 3'(k); wr_addr = 10'(j); wr_data = sym_t'($urandom);
      src[k][j] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  // Issue one start as soon as ready is high and queue the expected packet.
  task automatic issue(input int n, input int len, input bit to_rx);
    exp_pkt_t e;
    @(negedge clk);
    while (!ready) @(negedge clk);
    if (out_valid) n_back_to_back++;  // previous packet still streaming
    start = 1; num_pkts = 4'(n); pkt_len = 11'(len);
    e.n = n; e.len = len; e.t_start = cycle; e.to_rx = to_rx;
    for (int k = 0; k < N; k++) begin
      if (k < n) begin
        lfsr_ref[k] = lfsr_next_ref(lfsr_ref[k], LFSR_POLYS[k], 8);
        e.coef[k] = sym_t'(lfsr_ref[k]);
      end else e.coef[k] = '0;
    end
    exp_q.push_back(e);
    if (n == N) n_full_gen++; else n_gated++;
    @(negedge clk);
    start = 0;
  endtask

  // Add the packet in cur_c/cur_d to the receiver; returns via rx_rank.
  task automatic rx_add();
    int p;
    int unsigned inv, f;
    for (int r = 0; r < rx_rank; r++) begin
      f = cur_c[rx_pivot[r]];
      if (f != 0) begin
        for (int k = 0; k < N; k++) cur_c[k] ^= gf_mul_ref(f, rx_c[r][k], GF_POLY, 8);
        for (int j = 0; j < L; j++) cur_d[j] ^= sym_t'(gf_mul_ref(f, rx_d[r][j], GF_POLY, 8));
      end
    end
    p = -1;
    for (int k = N - 1; k >= 0; k--) if (cur_c[k] != 0) p = k;
    if (p < 0) begin n_dependent++; return; end
    inv = gf_inv_ref(cur_c[p], GF_POLY, 8);
    for (int k = 0; k < N; k++) cur_c[k] = gf_mul_ref(cur_c[k], inv, GF_POLY, 8);
    for (int j = 0; j < L; j++) cur_d[j] = sym_t'(gf_mul_ref(cur_d[j], inv, GF_POLY, 8));
    for (int r = 0; r < rx_rank; r++) begin
      f = rx_c[r][p];
      if (f != 0) begin
        for (int k = 0; k < N; k++) rx_c[r][k] ^= gf_mul_ref(f, cur_c[k], GF_POLY, 8);
        for (int j = 0; j < L; j++) rx_d[r][j] ^= sym_t'(gf_mul_ref(f, cur_d[j], GF_POLY, 8));
      end
    end
    rx_c[rx_rank] = cur_c;
    rx_d[rx_rank] = cur_d;
    rx_pivot[rx_rank] = p;
    rx_rank++;
  endtask

  // Output monitor
  initial begin
    forever begin
      exp_pkt_t e;
      @(negedge clk);
      if (out_valid) begin
        chk(exp_q.size() > 0, "output with no packet expected");
        if (exp_q.size() == 0) continue;
        e = exp_q.pop_front();
        chk(cycle == e.t_start + 3, $sformatf("latency: first symbol at %0d, expected %0d", cycle, e.t_start + 3));
        for (int k = 0; k < N; k++)
          chk(out_coef[k] == e.coef[k], $sformatf("coef lane %0d: %02h vs %02h", k, out_coef[k], e.coef[k]));
        for (int j = 0; j < e.len; j++) begin
          sym_t x;
          x = '0;
          for (int k = 0; k < e.n; k++) x ^= sym_t'(gf_mul_ref(e.coef[k], src[k][j], GF_POLY, 8));
          chk(out_valid, $sformatf("gap in output at symbol %0d of %0d", j, e.len));
          chk(out_data == x, $sformatf("pkt %0d n=%0d len=%0d symbol %0d: %02h vs %02h", pkts_done, e.n, e.len, j, out_data, x));
          chk(out_first == (j == 0) && out_last == (j == e.len - 1), $sformatf("first/last at %0d", j));
          cur_d[j] = out_data;
          if (j != e.len - 1) @(negedge clk);
        end
        if (e.to_rx) begin
          for (int k = 0; k < N; k++) cur_c[k] = e.coef[k];
          rx_add();
        end
        pkts_done++;
      end
    end
  end

  task automatic wait_done(input int total);
    while (pkts_done < total) @(negedge clk);
  endtask

  initial begin
    int issued;
    issued = 0;
    for (int k = 0; k < N; k++) lfsr_ref[k] = LFSR_SEEDS[k];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ready && !out_valid, "idle after reset");
    for (int k = 0; k < N; k++) load(k, L);

    // full generation: keep coding until the receiver has 8 independent packets
    while (rx_rank < N && issued < MAX_CODED) begin
      issue(N, L, 1);
      issued++;
      // let the receiver consume before deciding on the next one, except for
      // every other packet, which is issued back to back
      if (issued % 2 == 0) wait_done(issued);
    end
    wait_done(issued);
    while (rx_rank < N && issued < MAX_CODED) begin
      issue(N, L, 1); issued++; wait_done(issued);
    end
    chk(rx_rank == N, $sformatf("receiver reached rank %0d after %0d coded packets", rx_rank, issued));
    if (rx_rank == N) begin
      int bad;
      bad = 0;
      for (int r = 0; r < N; r++)
        for (int j = 0; j < L; j++) if (rx_d[r][j] != src[rx_pivot[r]][j]) bad++;
      chk(bad == 0, $sformatf("decoded generation differs in %0d symbols", bad));
      if (bad == 0) n_decoded++;
    end

    // fewer lanes, shorter packets, back to back
    issue(3, 100, 0); issued++;
    // a write attempted during encoding must be ignored
    @(negedge clk);
    wr_en = 1; wr_pkt = 3'd0; wr_addr = 10'd0; wr_data = ~src[0][0];
    if (!ready) n_wr_ignored++;
    @(negedge clk);
    wr_en = 0;
    issue(1, 1, 0); issued++;
    issue(5, 37, 0); issued++;
    issue(8, 2, 0); issued++;
    wait_done(issued);

    // illegal start is refused
    @(negedge clk);
    start = 1; num_pkts = 4'd0; pkt_len = 11'd10;
    #1;
    if (bad_start) n_bad_start++;
    chk(bad_start && ready, "illegal start flagged");
    @(negedge clk);
    start = 0;
    repeat (4) @(negedge clk);
    chk(!out_valid && ready, "no output after illegal start");

    // packet 0 symbol 0 is unchanged by the ignored write
    issue(1, 3, 0); issued++;
    wait_done(issued);

    chk(n_full_gen > 0,     "full generation encoded");
    chk(n_gated > 0,        "gated lanes exercised");
    chk(n_back_to_back > 0, "back-to-back packets exercised");
    chk(n_bad_start > 0,    "illegal start exercised");
    chk(n_wr_ignored > 0,   "write during encoding exercised");
    chk(n_decoded > 0,      "generation decoded");
    $display("coded packets sent for one generation: %0d (%0d dependent; two may be in flight when rank 8 is reached)", n_full_gen, n_dependent);
    $display("mechanisms: full_gen=%0d gated=%0d back_to_back=%0d bad_start=%0d wr_ignored=%0d decoded=%0d",
             n_full_gen, n_gated, n_back_to_back, n_bad_start, n_wr_ignored, n_decoded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
