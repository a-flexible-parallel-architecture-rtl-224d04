// status_check_tb: feeds bursts of new / old estimate pairs (N per burst in
// DRL, N*M in PRL, with random pauses inside) and checks, one clock after
// each pair: the feedback register (data, valid, first-of-iteration), and
// after the last pair of a burst a one-clock status_valid whose `consistent`
// says whether every pair matched (equal label vectors in DRL, difference
// within eps in PRL). Bursts are built to match, to miss by one element,
// or to sit exactly on the tolerance.
`timescale 1ns/1ps
module status_check_tb;
  import relax_pkg::*;
  localparam int N = N_OBJ, M = M_LAB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e         mode;
  logic [DW-1:0] eps, r_out, p_out, fb_data;
  logic          r_valid, status_valid, consistent, fb_valid, fb_first;
  int checks = 0, failures = 0;
  int n_ok = 0, n_bad = 0;

  status_check #(.N(N), .M(M)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic burst(mode_e md, int kind);   // kind 0 match, 1 one miss, 2 on tolerance
    int len = (md == MODE_DRL) ? N : N * M;
    int bad = int'($urandom_range(len - 1));
    bit exp_ok = (kind != 1);
    mode = md;
    eps = (md == MODE_DRL) ? DW'($urandom) : DW'($urandom_range(4));
    for (int k = 0; k < len; k++) begin
      int a, b;
      if (md == MODE_DRL) begin
        a = int'($urandom_range(255));
        b = (a & 7) | (int'($urandom_range(31)) << 3);          // upper bits ignored
        if (kind == 1 && k == bad) b = b ^ (1 << $urandom_range(2));
      end else begin
        a = int'($urandom_range(64));
        b = a + ((kind == 2) ? (($urandom_range(1) != 0) ? int'(eps) : -int'(eps)) : 0);
        if (kind == 1 && k == bad) b = a + int'(eps) + 1 + int'($urandom_range(3));
      end
      // random pause before the pair
      r_valid = 0;
      repeat ($urandom_range(2)) begin
        @(negedge clk);
        chk(!status_valid && !fb_valid, "no status or feedback during a pause");
      end
      r_out = DW'(a); p_out = DW'(b); r_valid = 1;
      @(negedge clk);
      r_valid = 0;
      chk(fb_valid && fb_data == DW'(a), "feedback data");
      chk(fb_first == (k == 0), "feedback first flag");
      chk(status_valid == (k == len - 1), "status pulse only after the last pair");
      if (k == len - 1) begin
        chk(consistent == exp_ok, $sformatf("consistent=%0d expected %0d (kind %0d)", consistent, exp_ok, kind));
        if (exp_ok) n_ok++; else n_bad++;
      end
    end
    @(negedge clk);
    chk(!status_valid, "status pulse lasts one clock");
  endtask

  initial begin
    mode = MODE_DRL; eps = 0; r_out = 0; p_out = 0; r_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 60; r++) burst((r % 2) ? MODE_PRL : MODE_DRL, r % 3);
    chk(n_ok > 0 && n_bad > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
