// tb_nc_workloads: runs the generation sizes and packet lengths of the
// evaluated scenarios through the full-size encoder and decodes each one.
//
//   * 8 packets of 1 KB over GF(2^8), the energy-model scenario;
//   * 5 packets of 32, 64, 128 and 256 bytes, the generation size and the
//     packet lengths of the partial-packet recovery measurements.
// For each scenario, fresh source packets are loaded, coded packets are
// produced until a reference Gauss-Jordan receiver holds n independent
// ones, and the decoded packets are compared with the source. Every coded
// symbol and coefficient is also checked as in tb_nc_encoder. The number of
// coded packets each generation needed is printed.
module tb_nc_workloads;
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

  task automatic run_generation(input int n, input int len);
    int issued;
    issued = 0;
    rx_rank = 0;
    n_dependent = 0;
    for (int k = 0; k < n; k++) load(k, len);
    while (rx_rank < n && issued < MAX_CODED) begin
      issue(n, len, 1);
      issued++;
      wait_done(pkts_done + 1);
    end
    chk(rx_rank == n, $sformatf("n=%0d len=%0d: rank %0d after %0d coded packets", n, len, rx_rank, issued));
    if (rx_rank == n) begin
      int bad;
      bad = 0;
      for (int r = 0; r < n; r++)
        for (int j = 0; j < len; j++) if (rx_d[r][j] != src[rx_pivot[r]][j]) bad++;
      chk(bad == 0, $sformatf("n=%0d len=%0d: decoded generation differs in %0d symbols", n, len, bad));
      if (bad == 0) n_decoded++;
    end
    $display("workload n=%0d len=%0d: %0d coded packets sent, %0d dependent", n, len, issued, n_dependent);
  endtask

  initial begin
    for (int k = 0; k < N; k++) lfsr_ref[k] = LFSR_SEEDS[k];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_generation(8, 1024);
    run_generation(5, 32);
    run_generation(5, 64);
    run_generation(5, 128);
    run_generation(5, 256);
    chk(n_decoded == 5, "all workloads decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
