// main_array_tb: the three rows of the main module on the worked examples.
// Coefficients are preloaded in the circular arrangement the rows need
// (PE m pairs result slot q with stream element ((q-m-1) mod len)+1), the
// estimates are streamed twice as the sequencer does, and the rows' outputs
// are checked clock by clock:
//   DRL: S_i(lambda_t) = AND_j OR_p C_ij(t,p) L_j(p) on row t at clock 18+i,
//        the old label vector L_i on every row's W line in the same clock;
//   PRL: S_i(lambda_t) = sum_jp C_ij(t,p) P_j(p) on row t at clock 59+3(i-1),
//        and P_i(lambda_t) on row t's W line in that clock (rows' PFIFOs
//        14, 13, 12).
// The tag must be high exactly in the len result slots.
`timescale 1ns/1ps
module main_array_tb;
  import relax_pkg::*;
  localparam int N = N_OBJ, M = M_LAB, L = N * M;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e         mode;
  logic          coef_we;
  logic [1:0]    coef_row;
  logic [3:0]    coef_pe;
  logic [DW-1:0] coef_data, x_in;
  logic [YW-1:0] y_in;
  logic          tag_in, y_tag;
  logic [YW-1:0] y_rows [M];
  logic [DW-1:0] w_rows [M];
  int checks = 0, failures = 0;

  main_array #(.N(N), .M(M)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int elem(int q, int m, int len);
    int v = (q - m - 1) % len;
    if (v < 0) v += len;
    return v + 1;
  endfunction
  function automatic int sat(int v);
    int hi = (1 << (YW - 1)) - 1, lo = -(1 << (YW - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  function automatic int fmul(int c, int p);
    int pr = c * p;
    return (pr >= 0) ? pr / (1 << FRAC) : -((-pr + (1 << FRAC) - 1) / (1 << FRAC));
  endfunction

  int C [N][N][M][M];      // C[i][j][t][p]
  int E [L];               // estimates: DRL label vectors E[0..N-1], PRL P_j(p) at j*M+p

  task automatic run(mode_e md);
    int len = (md == MODE_DRL) ? N : L;
    int t_first = 4 * len - 1;
    int yv [M][200];
    int wv [M][200];
    bit tv [200];
    mode = md;
    tag_in = 0; x_in = 0; y_in = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int t = 0; t < M; t++)
          for (int p = 0; p < M; p++)
            C[i][j][t][p] = (md == MODE_DRL) ? int'($urandom_range(3) != 0) : int'($urandom_range(8)) - 4;
    for (int k = 0; k < len; k++)
      E[k] = (md == MODE_DRL) ? int'($urandom_range(7)) | (1 << $urandom_range(2)) : int'($urandom_range(64));
    // preload
    for (int t = 0; t < M; t++)
      for (int m = 1; m <= len; m++)
        for (int q = 1; q <= len; q++) begin
          int e = elem(q, m, len);
          int d = 0;
          if (md == MODE_DRL)
            for (int p = 0; p < M; p++) d |= C[q-1][e-1][t][p] << p;
          else if ((q - 1) % M == 0)
            d = C[(q-1)/M][(e-1)/M][t][(e-1)%M];
          @(negedge clk);
          coef_we = 1; coef_row = 2'(t); coef_pe = 4'(m - 1); coef_data = DW'(d);
        end
    @(negedge clk); coef_we = 0;
    // stream: clock c has X = E[c mod len] for c < 2 len; tag in [len-1, 2len-2]
    for (int c = 0; c < 200; c++) begin
      x_in   = (c < 2 * len) ? DW'(E[c % len]) : '0;
      y_in   = (md == MODE_DRL) ? YW'(1) : '0;
      tag_in = (c >= len - 1) && (c <= 2 * len - 2);
      @(posedge clk); #1;
      // outputs seen in clock c+1
      if (c + 1 < 200) begin
        for (int t = 0; t < M; t++) begin yv[t][c+1] = int'($signed(y_rows[t])); wv[t][c+1] = int'(w_rows[t]); end
        tv[c+1] = y_tag;
      end
      @(negedge clk);
    end
    for (int c = 1; c < 200; c++)
      chk(tv[c] == ((c >= t_first) && (c < t_first + len)), $sformatf("tag at clock %0d", c));
    for (int t = 0; t < M; t++)
      for (int i = 0; i < N; i++) begin
        int c = (md == MODE_DRL) ? t_first + i : t_first + M * i;
        int s;
        if (md == MODE_DRL) begin
          s = 1;
          for (int j = 0; j < N; j++) begin
            int o = 0;
            for (int p = 0; p < M; p++) o |= C[i][j][t][p] & ((E[j] >> p) & 1);
            s &= o;
          end
          chk((yv[t][c] & 1) == s, $sformatf("DRL S_%0d(lambda_%0d) at %0d", i + 1, t + 1, c));
          chk(wv[t][c] == E[i], $sformatf("DRL W row %0d at %0d", t, c));
        end else begin
          s = 0;
          for (int m = 1; m <= L; m++) begin
            int e = elem(M * i + 1, m, L);
            s = sat(s + fmul(C[i][(e-1)/M][t][(e-1)%M], E[e-1]));
          end
          chk(yv[t][c] == s, $sformatf("PRL S_%0d(lambda_%0d) at %0d: %0d vs %0d", i + 1, t + 1, c, yv[t][c], s));
          chk(wv[t][c] == E[M * i + t], $sformatf("PRL W row %0d at %0d", t, c));
        end
      end
  endtask

  initial begin
    mode = MODE_DRL; coef_we = 0; coef_row = 0; coef_pe = 0; coef_data = 0;
    x_in = 0; y_in = 0; tag_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_DRL);
    run(MODE_PRL);
    run(MODE_DRL);
    run(MODE_PRL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
