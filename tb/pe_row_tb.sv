// pe_row_tb: one systolic row (label lambda_1) on the worked examples.
// The row's PE rings are preloaded in the circular arrangement, the
// estimates are streamed twice, and the row output is checked clock by clock:
//   DRL (5 of the 15 PEs, PFIFO 4): S_i(lambda_1) at clocks 19..23, with the
//        old label vector L_i on the W line in the same clock;
//   PRL (15 PEs, PFIFO 14): S_i(lambda_1) at clocks 59, 62, ..., 71 and
//        P_i(lambda_1) on the W line with it.
// The tag must be high exactly in the result slots.
`timescale 1ns/1ps
module pe_row_tb;
  import relax_pkg::*;
  localparam int N = N_OBJ, M = M_LAB, L = N * M;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e         mode;
  logic [3:0]    pfifo_len;
  logic [L-1:0]  coef_ld;
  logic [DW-1:0] coef_din, x_in, w_out;
  logic [YW-1:0] y_in, y_out;
  logic          tag_in, tag_out;
  int checks = 0, failures = 0;

  pe_row #(.N(N), .M(M)) dut (.*);

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

  int C [N][N][M];         // C[i][j][p] = C_ij(lambda_1, lambda_p)
  int E [L];

  task automatic run(mode_e md);
    int len = (md == MODE_DRL) ? N : L;
    int t_first = 4 * len - 1;
    int yv [200];
    int wv [200];
    bit tv [200];
    mode = md;
    pfifo_len = 4'(len - 1);
    tag_in = 0; x_in = 0; y_in = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++)
          C[i][j][p] = (md == MODE_DRL) ? int'($urandom_range(3) != 0) : int'($urandom_range(8)) - 4;
    for (int k = 0; k < len; k++)
      E[k] = (md == MODE_DRL) ? int'($urandom_range(7)) | (1 << $urandom_range(2)) : int'($urandom_range(64));
    for (int m = 1; m <= len; m++)
      for (int q = 1; q <= len; q++) begin
        int e = elem(q, m, len);
        int d = 0;
        if (md == MODE_DRL)
          for (int p = 0; p < M; p++) d |= C[q-1][e-1][p] << p;
        else if ((q - 1) % M == 0)
          d = C[(q-1)/M][(e-1)/M][(e-1)%M];
        @(negedge clk);
        coef_ld = '0; coef_ld[m-1] = 1'b1; coef_din = DW'(d);
      end
    @(negedge clk); coef_ld = '0;
    for (int c = 0; c < 200; c++) begin
      x_in   = (c < 2 * len) ? DW'(E[c % len]) : '0;
      y_in   = (md == MODE_DRL) ? YW'(1) : '0;
      tag_in = (c >= len - 1) && (c <= 2 * len - 2);
      @(posedge clk); #1;
      if (c + 1 < 200) begin yv[c+1] = int'($signed(y_out)); wv[c+1] = int'(w_out); tv[c+1] = tag_out; end
      @(negedge clk);
    end
    for (int c = 1; c < 200; c++)
      chk(tv[c] == ((c >= t_first) && (c < t_first + len)), $sformatf("tag at clock %0d", c));
    for (int i = 0; i < N; i++) begin
      int c = (md == MODE_DRL) ? t_first + i : t_first + M * i;
      int s;
      if (md == MODE_DRL) begin
        s = 1;
        for (int j = 0; j < N; j++) begin
          int o = 0;
          for (int p = 0; p < M; p++) o |= C[i][j][p] & ((E[j] >> p) & 1);
          s &= o;
        end
        chk((yv[c] & 1) == s, $sformatf("DRL S_%0d at %0d", i + 1, c));
        chk(wv[c] == E[i], $sformatf("DRL W at %0d", c));
      end else begin
        s = 0;
        for (int m = 1; m <= L; m++) begin
          int e = elem(M * i + 1, m, L);
          s = sat(s + fmul(C[i][(e-1)/M][(e-1)%M], E[e-1]));
        end
        chk(yv[c] == s, $sformatf("PRL S_%0d at %0d: %0d vs %0d", i + 1, c, yv[c], s));
        chk(wv[c] == E[M * i], $sformatf("PRL W at %0d", c));
      end
    end
  endtask

  initial begin
    mode = MODE_DRL; pfifo_len = 4; coef_ld = '0; coef_din = 0;
    x_in = 0; y_in = 0; tag_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_DRL);
    run(MODE_PRL);
    run(MODE_DRL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
