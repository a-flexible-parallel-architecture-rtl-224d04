// stream_ctrl_tb: plays the rest of the array around the sequencer.
// After the host shifts the initial estimates into the label buffer and
// pulses start, X_in must carry the estimates twice (2*len clocks) then
// zeros, Y_in the row identity, and the tag the len clocks from the last
// estimate of the first copy. The test then returns "new estimates" on the
// feedback port: each return must start a new iteration the next clock,
// its first copy taken from the feedback and its second from the buffer.
// A status pulse without consistency lets the run go on; one with
// consistency (DRL run) or reaching max_iter (PRL run) must suppress the
// tags of the iteration under way, end it after its first copy, raise done,
// and leave the last estimates in the buffer (read back with lbl_rd).
`timescale 1ns/1ps
module stream_ctrl_tb;
  import relax_pkg::*;
  localparam int N = N_OBJ, M = M_LAB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e         mode;
  logic          start, lbl_we, lbl_rd, fb_valid, fb_first, status_valid, consistent;
  logic [15:0]   max_iter, iter_count;
  logic [DW-1:0] lbl_din, lbl_head, fb_data, x_in;
  logic [YW-1:0] y_in;
  logic          tag_in, busy, done, converged;
  int checks = 0, failures = 0;

  stream_ctrl #(.N(N), .M(M)) dut (.*);

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

  // expected x_in / tag for one iteration starting at clock 0
  task automatic check_iter(int len, int vals [], bit tags_on, int upto, int ck0, ref int ck);
    for (int p = ck - ck0; p < upto; p++) begin
      int ex = (p < 2 * len) ? vals[p % len] : 0;
      bit et = tags_on && (p >= len - 1) && (p <= 2 * len - 2);
      chk(int'(x_in) == ex, $sformatf("x_in at phase %0d: %0d expected %0d", p, x_in, ex));
      chk(tag_in == et, $sformatf("tag at phase %0d", p));
      @(negedge clk); ck++;
    end
  endtask

  task automatic run(mode_e md, int iters_ok, bit end_consistent, int limit);
    int len = (md == MODE_DRL) ? N : N * M;
    int vals [];
    int ck = 0, ck0;
    int gap = 2 * len + 5;          // clock of the next feedback, after the stream
    vals = new[len];
    mode = md; max_iter = 16'(limit);
    for (int k = 0; k < len; k++) begin
      vals[k] = int'($urandom_range(200));
      @(negedge clk); lbl_we = 1; lbl_din = DW'(vals[k]);
    end
    @(negedge clk); lbl_we = 0;
    start = 1;
    @(negedge clk); start = 0;     // x_in now shows element 1: clock 0
    chk(busy, "busy after start");
    chk(int'(y_in) == ((md == MODE_DRL) ? 1 : 0), "Y_in identity");
    ck0 = 0;
    for (int it = 0; it <= iters_ok; it++) begin
      int nv [];
      bit last = (it == iters_ok);
      nv = new[len];
      // current iteration runs until the feedback arrives
      check_iter(len, vals, 1'b1, gap, ck0, ck);
      // feedback of len new estimates; the status of this iteration comes
      // len-1 clocks after the first of them
      for (int k = 0; k < len; k++) nv[k] = int'($urandom_range(200));
      ck0 = ck + 1;
      for (int k = 0; k < len; k++) begin
        fb_valid = 1; fb_first = (k == 0); fb_data = DW'(nv[k]);
        status_valid = (k == len - 1); consistent = last && end_consistent;
        if (k > 0) begin
          chk(int'(x_in) == nv[k-1], $sformatf("first copy from feedback, element %0d", k - 1));
          chk(tag_in == 1'b0, "no tag in the first copy");
        end
        @(negedge clk); ck++;
      end
      fb_valid = 0; fb_first = 0; status_valid = 0; consistent = 0;
      chk(int'(iter_count) == it + 1, $sformatf("iteration count %0d", iter_count));
      vals = nv;
      if (last) begin
        // tags suppressed, first copy completes, then done
        check_iter(len, vals, 1'b0, len, ck0, ck);
        @(negedge clk);
        chk(done && !busy, "done after the stop");
        chk(converged == end_consistent, "converged flag");
        chk(int'(x_in) == 0 && !tag_in, "stream stopped");
      end
    end
    // buffer holds the last estimates
    for (int k = 0; k < len; k++) begin
      chk(int'(lbl_head) == vals[k], $sformatf("buffer entry %0d", k));
      @(negedge clk); lbl_rd = 1; @(negedge clk); lbl_rd = 0;
    end
  endtask

  initial begin
    mode = MODE_DRL; start = 0; lbl_we = 0; lbl_rd = 0; lbl_din = 0; max_iter = 16;
    fb_valid = 0; fb_first = 0; fb_data = 0; status_valid = 0; consistent = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_DRL, 2, 1'b1, 16);    // two plain iterations, stop on consistency
    run(MODE_PRL, 0, 1'b1, 16);    // converges after the first
    run(MODE_PRL, 2, 1'b0, 3);     // stopped by the limit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
