// coef_ring_tb: loads rings of several lengths and checks that the top
// entry walks through the loaded values in load order, wraps round after
// `len` rotations, holds while neither rot nor load is set, and that a
// short ring ignores the entries beyond its length.
`timescale 1ns/1ps
module coef_ring_tb;
  localparam int W = 8, MAXL = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0]   len;
  logic         rot, load;
  logic [W-1:0] din, top;
  int checks = 0, failures = 0;

  coef_ring #(.W(W), .MAX_LEN(MAXL)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [W-1:0] exp, string what);
    checks++;
    if (top !== exp) begin
      failures++;
      $display("FAIL %s: top=%h expected %h", what, top, exp);
    end
  endtask

  initial begin
    logic [W-1:0] v [MAXL];
    rot = 0; load = 0; din = 0; len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int li = 0; li < 4; li++) begin
      automatic int l = (li == 0) ? 1 : (li == 1) ? 3 : (li == 2) ? 5 : 15;
      len = 4'(l);
      for (int k = 0; k < l; k++) begin
        v[k] = W'($urandom);
        @(negedge clk); load = 1; din = v[k];
      end
      @(negedge clk); load = 0;
      chk(v[0], "after load");
      // three full turns, with idle clocks in between
      for (int n = 0; n < 3 * l; n++) begin
        chk(v[n % l], $sformatf("len %0d rotation %0d", l, n));
        @(negedge clk); rot = 1;
        @(negedge clk); rot = 0;
        if (n % 4 == 0) begin
          @(negedge clk);
        end
      end
      chk(v[0], "back to start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
