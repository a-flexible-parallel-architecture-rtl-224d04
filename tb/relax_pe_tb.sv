// relax_pe_tb: drives one processing element (with its PFIFO) with random
// X, Y, tag streams in both modes and checks every output every clock
// against a history model of the stage timing:
//   x_out(n) = X(n-4), tag/y out after 3 clocks, w_out = X delayed by the
//   PFIFO length plus 3, y_out = Y AND (OR_p C.L) in DRL and
//   Y + C x P (saturating, fixed point) in PRL, with the coefficient ring
//   advancing whenever a tag passes the PFIFO stage.
`timescale 1ns/1ps
module relax_pe_tb;
  import relax_pkg::*;
  localparam int RING = 15, FIFO = 14, NC = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e         mode;
  logic [3:0]    pfifo_len, ring_len;
  logic          coef_ld;
  logic [DW-1:0] coef_din, x_in, w_in, x_out, w_out;
  logic [YW-1:0] y_in, y_out;
  logic          tag_in, tag_out;
  int checks = 0, failures = 0;

  relax_pe #(.M(3), .MAX_RING(RING), .MAX_FIFO(FIFO), .HAS_PFIFO(1'b1)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int sat(int v);
    int hi = (1 << (YW - 1)) - 1, lo = -(1 << (YW - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int fmul(int c, int p);   // floor((c*p) / 2^FRAC)
    int pr = c * p;
    return (pr >= 0) ? pr / (1 << FRAC) : -((-pr + (1 << FRAC) - 1) / (1 << FRAC));
  endfunction

  task automatic run(mode_e md, int rl, int fl);
    int X [NC], Y [NC], T [NC], TOP [NC], IR [NC];
    int ring [$];
    mode = md; ring_len = 4'(rl); pfifo_len = 4'(fl);
    tag_in = 0;                       // no live slot while the ring is loaded
    repeat (2) @(negedge clk);
    // preload the ring
    for (int k = 0; k < rl; k++) begin
      int v = (md == MODE_DRL) ? int'($urandom_range(7)) : int'($urandom_range(64)) - 32;
      ring.push_back(v);
      @(negedge clk); coef_ld = 1; coef_din = DW'(v);
    end
    @(negedge clk); coef_ld = 0;
    for (int n = 0; n < NC; n++) begin
      // inputs for the cycle ending at posedge n
      X[n] = (md == MODE_DRL) ? int'($urandom_range(7)) : int'($urandom_range(64));
      Y[n] = (md == MODE_DRL) ? int'($urandom_range(1)) : int'($urandom_range(400)) - 200;
      T[n] = ($urandom_range(3) != 0);
      x_in = DW'(X[n]); y_in = YW'(Y[n]); tag_in = T[n][0]; w_in = DW'($urandom);
      TOP[n] = ring[0];
      if (n >= 1) IR[n] = (md == MODE_DRL) ? int'(|(3'(TOP[n]) & 3'(X[n-1])))
                                          : sat(fmul(TOP[n], X[n-1]));
      @(posedge clk);
      if (n >= 1 && T[n-1]) ring.push_back(ring.pop_front());
      #1;
      if (n >= 4 + fl) begin
        chk(x_out, DW'(X[n-3]), "x_out");
        chk(tag_out, T[n-2], "tag_out");
        chk(w_out, DW'(X[n-2-fl]), "w_out");
        if (md == MODE_DRL) chk(y_out, YW'(Y[n-2] & IR[n-1]), "y_out DRL");
        else                chk(y_out, 32'(YW'(unsigned'(sat(Y[n-2] + IR[n-1])))), "y_out PRL");
      end
      @(negedge clk);
    end
  endtask

  initial begin
    mode = MODE_DRL; pfifo_len = 0; ring_len = 1; coef_ld = 0; coef_din = 0;
    x_in = 0; y_in = 0; tag_in = 0; w_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_DRL, 5, 4);
    run(MODE_PRL, 15, 14);
    run(MODE_PRL, 15, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
