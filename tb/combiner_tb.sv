// combiner_tb: drives the combiner directly with random row outputs in
// bursts of live slots, as the rows deliver them, and checks every clock:
//   DRL: r_out = L AND {S(lambda_1..3)} and p_out = L exactly 5 clocks after
//        the slot, r_valid only then;
//   PRL: for each group of 3 slots (S_i(lambda_1..3) and P_i(lambda_1..3)
//        loaded together), new estimates P(1+S)/sum P(1+S) in fixed point on
//        r_out 7, 8 and 9 clocks after the group's first slot, with the old
//        estimates on p_out. Large and negative evidences exercise the
//        clamps.
`timescale 1ns/1ps
module combiner_tb;
  import relax_pkg::*;
  localparam int M = M_LAB, NC = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e         mode;
  logic [YW-1:0] y_rows [M];
  logic          y_tag, r_valid;
  logic [DW-1:0] w_rows [M];
  logic [DW-1:0] r_out, p_out;
  int checks = 0, failures = 0;

  combiner #(.M(M)) dut (.*);

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

  function automatic int sat(int v);
    int hi = (1 << (YW - 1)) - 1, lo = -(1 << (YW - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  bit ev [NC];
  int er [NC], ep [NC];

  task automatic run(mode_e md);
    int c = 0, lat = (md == MODE_DRL) ? 5 : M + 4;
    int burst = (md == MODE_DRL) ? 5 : 15;
    int nv = 0;
    mode = md;
    for (int k = 0; k < NC; k++) begin ev[k] = 0; er[k] = 0; ep[k] = 0; end
    y_tag = 0;
    repeat (12) @(negedge clk);
    while (pc < NC - 40) begin
      int gap = int'($urandom_range(8));
      for (int g = 0; g < gap; g++) begin
        y_tag = 0;
        for (int t = 0; t < M; t++) begin y_rows[t] = YW'($urandom); w_rows[t] = DW'($urandom); end
        @(negedge clk); c++;
      end
      for (int s = 0; s < burst; s++) begin
        int yy [M];
        int ww [M];
        y_tag = 1;
        for (int t = 0; t < M; t++) begin
          if (md == MODE_DRL) begin
            yy[t] = int'($urandom_range(1)); ww[t] = int'($urandom_range(7));
          end else begin
            case ($urandom_range(9))
              0: yy[t] = int'($urandom_range(4000)) - 2000;      // saturate / clamp
              default: yy[t] = int'($urandom_range(120)) - 60;
            endcase
            ww[t] = ($urandom_range(15) == 0) ? -int'($urandom_range(10)) : int'($urandom_range(64));
          end
          y_rows[t] = YW'(yy[t]); w_rows[t] = DW'(ww[t]);
        end
        if (md == MODE_DRL) begin
          int sv = 0;
          for (int t = 0; t < M; t++) sv |= yy[t] << t;
          ev[pc + lat] = 1; er[pc + lat] = ww[0] & sv; ep[pc + lat] = ww[0];
        end else if (s % M == 0) begin
          int num [M];
          int sum = 0;
          for (int t = 0; t < M; t++) begin
            int a = sat((1 << FRAC) + yy[t]);
            if (a < 0) a = 0;
            num[t] = a * ww[t];
            if (num[t] < 0) num[t] = 0;
            sum += num[t];
          end
          for (int t = 0; t < M; t++) begin
            int q = (sum <= 0 || num[t] <= 0) ? 0 : (num[t] * (1 << FRAC)) / sum;
            ev[pc + lat + t] = 1;
            er[pc + lat + t] = (q > (1 << FRAC)) ? (1 << FRAC) : q;
            ep[pc + lat + t] = ww[t] & 8'hff;
          end
        end
        @(negedge clk); c++;
      end
    end
    y_tag = 0;
    repeat (20) @(negedge clk);
  endtask

  // checker: pc counts rising edges; inputs set while pc = P are sampled at
  // edge P+1, and a result lat registers later is seen while pc = P + lat.
  int pc = 0;
  bit checking = 0;
  always @(posedge clk) pc <= pc + 1;
  always @(negedge clk) begin
    if (checking) begin
      automatic int cc = pc;
      if (cc < NC) begin
        chk(r_valid == ev[cc], $sformatf("r_valid at %0d", cc));
        if (ev[cc]) begin
          chk(int'(r_out) == er[cc], $sformatf("r_out at %0d: %0d vs %0d", cc, r_out, er[cc]));
          chk(int'(p_out) == ep[cc], $sformatf("p_out at %0d: %0d vs %0d", cc, p_out, ep[cc]));
        end
      end
    end
  end

  initial begin
    mode = MODE_DRL; y_tag = 0;
    for (int t = 0; t < M; t++) begin y_rows[t] = '0; w_rows[t] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      automatic mode_e md = (r == 0) ? MODE_DRL : MODE_PRL;
      @(negedge clk);
      pc = 0; checking = 1;
      run(md);
      checking = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
