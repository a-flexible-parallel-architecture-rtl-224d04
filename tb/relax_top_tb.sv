// relax_top_tb: end-to-end test of the relaxation labeling array at its
// default size (N = 5 objects, M = 3 labels).
//
// 1. DRL: the five-region, three-colour map example. Adjacent regions must
//    get different colours; regions 1 and 2 are pre-coloured red and green.
//    Labels propagate over several iterations until the array detects
//    consistency by itself. Every new label vector, every old one on p_out,
//    the iteration count and the clock numbers (first evidence after 19
//    clocks, first new label after 24, one iteration per 26) are checked
//    against a software model of the labeling rule.
// 2. PRL with random small compatibilities and random initial estimates,
//    run to convergence (tolerance eps), checked bit for bit against a
//    fixed-point model; clocks: evidence after 59, first estimate after 66,
//    last after 80, one iteration per 68.
// 3. PRL stopped by the iteration limit, then DRL again (mode switches).
// Each mechanism (both modes, consistency stop, convergence stop, limit
// stop, feedback iterations, mode switch) is counted and must occur.
`timescale 1ns/1ps
module relax_top_tb;
  import relax_pkg::*;

  localparam int N = N_OBJ;
  localparam int M = M_LAB;
  localparam int L_PRL = N * M;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e          mode;
  logic           start;
  logic [15:0]    max_iter;
  logic [DW-1:0]  eps;
  logic           coef_we;
  logic [1:0]     coef_row;
  logic [3:0]     coef_pe;
  logic [DW-1:0]  coef_data;
  logic           lbl_we, lbl_rd;
  logic [DW-1:0]  lbl_din, lbl_head;
  logic [DW-1:0]  r_out, p_out;
  logic           r_valid, status_valid, consistent, busy, done, converged;
  logic [15:0]    iter_count;

  relax_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_drl_runs = 0, n_prl_runs = 0, n_consist_stop = 0, n_conv_stop = 0;
  int n_limit_stop = 0, n_feedback_iters = 0, n_mode_switch = 0;
  mode_e last_mode = MODE_DRL;
  bit    any_run = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // problem data
  // ------------------------------------------------------------------
  logic [M-1:0] cdrl [N][N][M];          // cdrl[i][j][t] bit p: C_ij(t,p)
  int           cprl [N][N][M][M];       // cprl[i][j][t][p], fraction bits FRAC
  logic [M-1:0] lab [N];                 // DRL labeling
  int           prob [L_PRL];            // PRL estimates, index j*M+p

  function automatic bit adjacent(int a, int b);
    // region map: 1-2, 1-3, 2-3, 2-4, 3-4, 3-5, 4-5 (0-based below)
    int lo = (a < b) ? a : b, hi = (a < b) ? b : a;
    return (lo == 0 && hi == 1) || (lo == 0 && hi == 2) || (lo == 1 && hi == 2) ||
           (lo == 1 && hi == 3) || (lo == 2 && hi == 3) || (lo == 2 && hi == 4) ||
           (lo == 3 && hi == 4);
  endfunction

  // slot q (1-based) at PE m (1-based) pairs with stream element e (1-based)
  function automatic int elem(int q, int m, int len);
    int v = (q - m - 1) % len;
    if (v < 0) v += len;
    return v + 1;
  endfunction

  task automatic write_coef(int row, int pe, logic [DW-1:0] d);
    @(negedge clk);
    coef_we = 1; coef_row = row[1:0]; coef_pe = pe[3:0]; coef_data = d;
    @(negedge clk);
    coef_we = 0;
  endtask

  task automatic load_coefs(mode_e md);
    int len = (md == MODE_DRL) ? N : L_PRL;
    for (int t = 0; t < M; t++)
      for (int m = 1; m <= len; m++)
        for (int q = 1; q <= len; q++) begin
          int e = elem(q, m, len);
          logic [DW-1:0] d = '0;
          if (md == MODE_DRL) d = DW'(cdrl[q-1][e-1][t]);
          else if ((q - 1) % M == 0)
            d = DW'(cprl[(q-1)/M][(e-1)/M][t][(e-1)%M]);
          write_coef(t, m - 1, d);
        end
  endtask

  task automatic load_labels(mode_e md);
    int len = (md == MODE_DRL) ? N : L_PRL;
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      lbl_we = 1;
      lbl_din = (md == MODE_DRL) ? DW'(lab[k]) : DW'(prob[k]);
    end
    @(negedge clk);
    lbl_we = 0;
  endtask

  // ------------------------------------------------------------------
  // reference models
  // ------------------------------------------------------------------
  function automatic int sat(int v, int w);
    int hi = (1 << (w - 1)) - 1, lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int fdiv(int a, int b);   // floor division
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  task automatic drl_step(ref logic [M-1:0] l [N], output logic [M-1:0] ln [N]);
    for (int i = 0; i < N; i++)
      for (int t = 0; t < M; t++) begin
        bit s = 1;
        for (int j = 0; j < N; j++) s &= |(cdrl[i][j][t] & l[j]);
        ln[i][t] = l[i][t] & s;
      end
  endtask

  task automatic prl_step(ref int p [L_PRL], output int pn [L_PRL]);
    int s [N][M];
    int num [M];
    // supporting evidence, summed in the order the row's PEs add it
    for (int t = 0; t < M; t++)
      for (int i = 0; i < N; i++) begin
        int q = i * M + 1, y = 0;
        for (int m = 1; m <= L_PRL; m++) begin
          int e = elem(q, m, L_PRL);
          int c = cprl[i][(e-1)/M][t][(e-1)%M];
          y = sat(y + fdiv(c * p[e-1], 1 << FRAC), YW);
        end
        s[i][t] = y;
      end
    for (int i = 0; i < N; i++) begin
      int sum = 0;
      for (int t = 0; t < M; t++) begin
        int a = sat((1 << FRAC) + s[i][t], YW);
        if (a < 0) a = 0;
        num[t] = a * p[i*M+t];
        if (num[t] < 0) num[t] = 0;
        sum += num[t];
      end
      for (int t = 0; t < M; t++) begin
        int qv = (sum <= 0 || num[t] <= 0) ? 0 : (num[t] * (1 << FRAC)) / sum;
        pn[i*M+t] = (qv > (1 << FRAC)) ? (1 << FRAC) : qv;
      end
    end
  endtask

  // ------------------------------------------------------------------
  // run one problem and check it
  // ------------------------------------------------------------------
  task automatic run(mode_e md, int limit, int tol);
    int len    = (md == MODE_DRL) ? N : L_PRL;
    int t_sev  = (md == MODE_DRL) ? 4 * N - 1 : 4 * L_PRL - 1;          // 19 / 59
    int t_r    = (md == MODE_DRL) ? 4 * N + 4 : 4 * L_PRL + M + 3;      // 24 / 66
    int period = t_r + 2;                                               // 26 / 68
    int t0, k, idx, exp_iters, first_tag, ncyc;
    bit exp_conv, seen_tag;
    int first_r [$];
    int r_cyc [$];
    int got [$];
    int gotp [$];
    int ref_old [L_PRL];
    int ref_new [L_PRL];
    int hist_old [$][L_PRL];
    logic [M-1:0] lnew [N];

    if (any_run && md != last_mode) n_mode_switch++;
    any_run = 1; last_mode = md;
    mode = md; max_iter = 16'(limit); eps = DW'(tol);
    load_coefs(md);
    load_labels(md);

    // expected sequence of labelings from the model
    for (int x = 0; x < len; x++) ref_old[x] = (md == MODE_DRL) ? int'(lab[x]) : prob[x];
    exp_iters = 0; exp_conv = 0;
    while (1) begin
      bit same = 1;
      if (md == MODE_DRL) begin
        logic [M-1:0] lc [N];
        for (int x = 0; x < N; x++) lc[x] = M'(ref_old[x]);
        drl_step(lc, lnew);
        for (int x = 0; x < N; x++) ref_new[x] = int'(lnew[x]);
      end else begin
        prl_step(ref_old, ref_new);
      end
      for (int x = 0; x < len; x++) begin
        int d = ref_new[x] - ref_old[x];
        if ((d < 0 ? -d : d) > ((md == MODE_DRL) ? 0 : tol)) same = 0;
      end
      hist_old.push_back(ref_old);
      exp_iters++;
      ref_old = ref_new;
      if (same) begin exp_conv = 1; break; end
      if (exp_iters >= limit) break;
    end

    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;               // clock in which the first estimate is on X_in
    seen_tag = 0; first_tag = -1; ncyc = 0;
    while (!done && ncyc < 5000) begin
      @(posedge clk);
      #1;
      ncyc++;
      if (dut.y_tag && !seen_tag) begin seen_tag = 1; first_tag = cyc - t0; end
      if (r_valid) begin
        if (got.size() % len == 0) first_r.push_back(cyc - t0);
        r_cyc.push_back(cyc - t0);
        got.push_back(int'(r_out));
        gotp.push_back(int'(p_out));
      end
    end

    check(done, "run ended with done");
    check(int'(iter_count) == exp_iters, $sformatf("iterations %0d expected %0d", iter_count, exp_iters));
    check(converged == exp_conv, "converged flag");
    check(got.size() == exp_iters * len, $sformatf("%0d results, expected %0d", got.size(), exp_iters * len));
    check(first_tag == t_sev, $sformatf("first evidence at clock %0d, expected %0d", first_tag, t_sev));
    for (int it = 0; it < first_r.size(); it++)
      check(first_r[it] == t_r + it * period,
            $sformatf("iteration %0d first estimate at clock %0d, expected %0d", it, first_r[it], t_r + it * period));

    // one estimate per clock: result x of iteration it at t_r + it*period + x
    for (int z = 0; z < r_cyc.size(); z++)
      check(r_cyc[z] == t_r + (z / len) * period + (z % len),
            $sformatf("result %0d at clock %0d, expected %0d", z, r_cyc[z], t_r + (z / len) * period + (z % len)));

    // replay the model to compare every estimate
    idx = 0;
    for (int it = 0; it < exp_iters && idx + len <= got.size(); it++) begin
      int o [L_PRL];
      int nw [L_PRL];
      o = hist_old[it];
      if (md == MODE_DRL) begin
        logic [M-1:0] lc [N];
        for (int x = 0; x < N; x++) lc[x] = M'(o[x]);
        drl_step(lc, lnew);
        for (int x = 0; x < N; x++) nw[x] = int'(lnew[x]);
      end else prl_step(o, nw);
      for (int x = 0; x < len; x++) begin
        int gv = (md == MODE_DRL) ? (got[idx] & ((1 << M) - 1)) : int'($signed(DW'(got[idx])));
        int gp = (md == MODE_DRL) ? (gotp[idx] & ((1 << M) - 1)) : int'($signed(DW'(gotp[idx])));
        check(gv == nw[x], $sformatf("iter %0d elem %0d new %0d expected %0d", it, x, gv, nw[x]));
        check(gp == o[x], $sformatf("iter %0d elem %0d old %0d expected %0d", it, x, gp, o[x]));
        idx++;
      end
    end

    // the label buffer holds the final estimates
    for (int x = 0; x < len; x++) begin
      int hv = (md == MODE_DRL) ? int'(lbl_head[M-1:0]) : int'($signed(lbl_head));
      check(hv == ref_old[x], $sformatf("buffer entry %0d = %0d, expected %0d", x, hv, ref_old[x]));
      @(negedge clk); lbl_rd = 1; @(negedge clk); lbl_rd = 0;
    end

    if (md == MODE_DRL) n_drl_runs++; else n_prl_runs++;
    if (exp_conv && md == MODE_DRL && converged) n_consist_stop++;
    if (exp_conv && md == MODE_PRL && converged) n_conv_stop++;
    if (!exp_conv && !converged && done) n_limit_stop++;
    if (first_r.size() > 1) n_feedback_iters += first_r.size() - 1;
    $display("%s run: %0d iterations, converged=%0d, first estimate at clock %0d",
             md == MODE_DRL ? "DRL" : "PRL", iter_count, converged, first_r.size() ? first_r[0] : -1);
  endtask

  initial begin
    mode = MODE_DRL; start = 0; max_iter = 16; eps = 0;
    coef_we = 0; coef_row = 0; coef_pe = 0; coef_data = 0;
    lbl_we = 0; lbl_din = 0; lbl_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- DRL: map colouring, regions 1 and 2 pre-coloured ----
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int t = 0; t < M; t++)
          for (int p = 0; p < M; p++)
            cdrl[i][j][t][p] = (i == j) ? (t == p) : adjacent(i, j) ? (t != p) : 1'b1;
    lab[0] = 3'b001; lab[1] = 3'b010;
    for (int i = 2; i < N; i++) lab[i] = 3'b111;
    run(MODE_DRL, 16, 0);

    // ---- PRL: random compatibilities, convergence ----
    void'($urandom(7));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int t = 0; t < M; t++)
          for (int p = 0; p < M; p++)
            cprl[i][j][t][p] = int'($urandom_range(8)) - 4;
    for (int x = 0; x < L_PRL; x++) prob[x] = 8 + int'($urandom_range(56));
    run(MODE_PRL, 30, 1);

    // ---- PRL stopped by the iteration limit ----
    for (int x = 0; x < L_PRL; x++) prob[x] = int'($urandom_range(64));
    run(MODE_PRL, 2, 0);

    // ---- DRL again: all labels open, an odd cycle of three regions ----
    lab[0] = 3'b011; lab[1] = 3'b011;
    for (int i = 2; i < N; i++) lab[i] = 3'b111;
    run(MODE_DRL, 16, 0);

    check(n_drl_runs > 0,       "mechanism: DRL mode");
    check(n_prl_runs > 0,       "mechanism: PRL mode");
    check(n_consist_stop > 0,   "mechanism: consistency detected in hardware");
    check(n_conv_stop > 0,      "mechanism: convergence detected in hardware");
    check(n_limit_stop > 0,     "mechanism: iteration limit");
    check(n_feedback_iters > 0, "mechanism: iterations fed back from the combiner");
    check(n_mode_switch > 0,    "mechanism: mode switch");
    $display("mechanisms: drl=%0d prl=%0d consistency=%0d convergence=%0d limit=%0d feedback=%0d switch=%0d",
             n_drl_runs, n_prl_runs, n_consist_stop, n_conv_stop, n_limit_stop, n_feedback_iters, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
