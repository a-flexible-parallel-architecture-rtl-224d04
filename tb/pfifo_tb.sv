// pfifo_tb: checks the programmable delay buffer for every length from 0
// (short circuit) to its maximum: dout must equal din from `len` clocks
// earlier, with random data, and a length change must take effect at once.
`timescale 1ns/1ps
module pfifo_tb;
  localparam int W = 8, MAXL = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0]   len;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  pfifo #(.W(W), .MAX_LEN(MAXL)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [$];
  initial begin
    len = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l <= MAXL; l++) begin
      len = 4'(l);
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        din = W'($urandom);
        #1;
        // dout now shows din of l clocks ago (this clock's din for l = 0)
        if (n >= MAXL) begin
          checks++;
          if (dout !== (l == 0 ? din : hist[hist.size() - l])) begin
            failures++;
            $display("FAIL len=%0d n=%0d dout=%h", l, n, dout);
          end
        end
        @(posedge clk);
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
