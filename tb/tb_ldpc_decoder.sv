// tb_ldpc_decoder: end-to-end, full-size testbench of the decoder (default
// parameters: 8088-bit frame, P = 24, at most 25 iterations).
//
// A reference model in this file decodes the same frames with the same
// fixed-point flooding schedule, but directly on the expanded parity check
// matrix H (row r of block row s meets column (r + offset) mod 337 of its
// block column), with no memories, alignment or routing. The decoder must give
// bit for bit the same hard decisions, the same number of iterations and the
// same convergence flag, and take exactly iters x 183 cycles (+1 for start).
//
// Frames (all-zero codeword, BPSK over an AWGN channel):
//   clean     noiseless: the first parity check holds, one pass;
//   snr2.5    BPSK/AWGN at Eb/N0 = 2.5 dB: converges in some iterations
//             (early stopping);
//   snr2.0    Eb/N0 = 2.0 dB;
//   snr-1     Eb/N0 = -1 dB: cannot converge, stops after 25 iterations.
// Mechanisms counted and required at least once: early stop, stop at the
// iteration limit, memory ping-pong swap, gap closing in the reverse
// alignment, deferred write of a block's last word, first-in-column write,
// accumulating write, weight-7 rows (empty PCUB slot), and reading the
// decoded data memory while the next frame is loaded (rechecked then).
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int N = M * K;
  localparam int NR = M * J;
  localparam int MAXIT = 25;

  logic clk = 1'b0;
  logic rst;
  logic ld_en, start, busy, done, converged;
  logic [4:0] ld_col, q_col;
  widx_t ld_word, q_word;
  rword_t ld_data;
  logic [$clog2(MAXIT+1)-1:0] iters;
  logic [P-1:0] q_hard;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int n_early = 0, n_maxit = 0, n_swap = 0, n_gap = 0, n_wb = 0;
  int n_first = 0, n_acc = 0, n_w7 = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.swap) n_swap++;
    if (done && converged) n_early++;
    if (done && !converged) n_maxit++;
    if (dut.g_csb[0].u_csb.o_on &&
        dut.g_csb[0].u_csb.o_g + 1 == 4'(WPB - 1) - dut.g_csb[0].u_csb.o_a) n_gap++;
    if (dut.g_csb[0].u_csb.wb_en) n_wb++;
    if (dut.g_csb[3].u_csb.wr_en && dut.g_csb[3].u_csb.wr_first) n_first++;
    if (dut.g_csb[3].u_csb.wr_en && !dut.g_csb[3].u_csb.wr_first) n_acc++;
    if (dut.o_en && !dut.slot_vld[WMAX-1]) n_w7++;
  end

  // ------------------------------------------------------- reference model
  int row_col [NR][WMAX];
  int row_deg [NR];
  int llr [N];

  function automatic int sat(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1; lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int psi(int x);
    int tbl [32] = '{12, 8, 6, 4, 3, 2, 2, 1, 1, 1, 1, 1, 0, 0, 0, 0,
                     0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    return tbl[x];
  endfunction

  task automatic build_h();
    for (int s = 0; s < J; s++)
      for (int r = 0; r < M; r++) begin
        int e;
        e = 0;
        for (int k = 0; k < NSEC; k++)
          if (conn(s, k)) begin
            int t, o;
            t = col_of(s, k);
            o = offset_of(s, t);
            row_col[s * M + r][e] = t * M + (r + o) % M;
            e++;
          end
        row_deg[s * M + r] = e;
      end
  endtask

  int ref_iters;
  bit ref_conv;
  bit ref_hard [N];

  task automatic ref_decode();
    int  asum [N], bsum [N], rm [NR][WMAX], lq [N];
    bit  avld, fail;
    avld = 0;
    ref_iters = 0;
    for (int r = 0; r < NR; r++) for (int e = 0; e < WMAX; e++) rm[r][e] = 0;
    forever begin
      bit started [N];
      for (int j = 0; j < N; j++) begin
        lq[j] = avld ? sat(asum[j] + llr[j], 7) : llr[j];
        started[j] = 0;
      end
      fail = 0;
      for (int r = 0; r < NR; r++) begin
        int q [WMAX], mag [WMAX], ps [WMAX], tot, sg, par;
        tot = 0; sg = 0; par = 0;
        for (int e = 0; e < row_deg[r]; e++) begin
          int v;
          v = lq[row_col[r][e]];
          par ^= (v < 0);
          q[e] = sat(v - rm[r][e], 6);
          mag[e] = (q[e] < 0) ? ((-q[e] > 31) ? 31 : -q[e]) : q[e];
          ps[e] = psi(mag[e]);
          tot += ps[e];
          sg ^= (q[e] < 0);
        end
        if (par) fail = 1;
        for (int e = 0; e < row_deg[r]; e++) begin
          int x, m, j;
          x = tot - ps[e];
          m = psi(x > 31 ? 31 : x);
          rm[r][e] = ((sg ^ (q[e] < 0)) != 0) ? -m : m;
          j = row_col[r][e];
          // rows are visited block row by block row, as the decoder does
          bsum[j] = started[j] ? sat(bsum[j] + rm[r][e], 7) : rm[r][e];
          started[j] = 1;
        end
      end
      ref_iters++;
      if (!fail) begin
        ref_conv = 1;
        break;
      end
      asum = bsum;
      avld = 1;
      if (ref_iters >= MAXIT) begin
        ref_conv = 0;
        break;
      end
    end
    for (int j = 0; j < N; j++)
      ref_hard[j] = lq[j] < 0;      // decisions checked in the last pass
  endtask

  // --------------------------------------------------------------- driver
  // BPSK over AWGN, all-zero codeword: y = 1 + sigma * n, LLR = 2y / sigma^2,
  // in steps of 1/4 and saturated to 6 bits; n is approximated by the sum of
  // 12 uniform numbers. sigma_milli = 0 gives the noiseless frame.
  bit have_prev = 0;
  int n_ldrd = 0;

  task automatic run_frame(string name, int sigma_milli);
    int t0, t1;
    real sg;
    sg = real'(sigma_milli) / 1000.0;
    for (int j = 0; j < N; j++) begin
      if (sigma_milli == 0) llr[j] = 31;
      else begin
        real n, y;
        n = -6.0;
        for (int u = 0; u < 12; u++) n += real'($urandom_range(0, 65535)) / 65536.0;
        y = 1.0 + sg * n;
        llr[j] = sat(int'(4.0 * 2.0 * y / (sg * sg)), 6);
      end
    end
    // load the frame word by word; meanwhile the previous frame's result is
    // read back once more (the decoded data must survive the load)
    for (int t = 0; t < K; t++)
      for (int w = 0; w < WPB; w++) begin
        @(negedge clk);
        ld_en = 1; ld_col = 5'(t); ld_word = widx_t'(w);
        for (int l = 0; l < P; l++)
          ld_data[l] = (w * P + l < M) ? WR'(llr[t * M + w * P + l]) : '0;
        if (have_prev) begin
          q_col = 5'((t + 7) % K); q_word = widx_t'(w);
          #1;
          n_ldrd++;
          for (int l = 0; l < P; l++)
            if (w * P + l < M) begin
              checks++;
              if (q_hard[l] != ref_hard[((t + 7) % K) * M + w * P + l]) failures++;
            end
        end
      end
    @(negedge clk);
    ld_en = 0;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    ref_decode();
    checks++;
    if (int'(iters) != ref_iters) begin
      failures++;
      $display("%s: iterations %0d, reference %0d", name, iters, ref_iters);
    end
    checks++;
    if (converged != ref_conv) begin
      failures++;
      $display("%s: converged %0d, reference %0d", name, converged, ref_conv);
    end
    checks++;
    if (t1 - t0 != int'(iters) * PASS_CYCLES + 1) begin
      failures++;
      $display("%s: %0d cycles for %0d iterations", name, t1 - t0, iters);
    end
    begin
      int bad;
      bad = 0;
      for (int t = 0; t < K; t++)
        for (int w = 0; w < WPB; w++) begin
          q_col = 5'(t); q_word = widx_t'(w);
          #1;
          for (int l = 0; l < P; l++)
            if (w * P + l < M) begin
              checks++;
              if (q_hard[l] != ref_hard[t * M + w * P + l]) begin
                failures++; bad++;
              end
            end
        end
      $display("%s: %0d iterations (reference %0d), converged %0d, %0d cycles, %0d bit mismatches",
               name, iters, ref_iters, converged, t1 - t0, bad);
    end
    have_prev = 1;
  endtask

  initial begin
    rst = 1; ld_en = 0; start = 0; ld_col = '0; ld_word = '0; ld_data = '0;
    q_col = '0; q_word = '0;
    build_h();
    repeat (3) @(negedge clk);
    rst = 0;
    run_frame("clean", 0);
    run_frame("snr2.5", 750);
    run_frame("snr2.0", 794);
    run_frame("snr-1", 1122);
    $display("mechanisms: early_stop=%0d max_iter_stop=%0d swap=%0d gap_closing=%0d deferred_write=%0d first_in_col=%0d accumulate=%0d weight7_rows=%0d read_during_load=%0d",
             n_early, n_maxit, n_swap, n_gap, n_wb, n_first, n_acc, n_w7, n_ldrd);
    checks += 9;
    if (n_ldrd == 0) failures++;
    if (n_early == 0) failures++;
    if (n_maxit == 0) failures++;
    if (n_swap == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_wb == 0) failures++;
    if (n_first == 0) failures++;
    if (n_acc == 0) failures++;
    if (n_w7 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
