// pfifo: programmable-length delay buffer (the PFIFO of the PE and of the
// combiner).
//
// A chain of MAX_LEN registers; the output is taken after `len` of them, so
// dout(t) = din(t - len). len = 0 short-circuits the buffer (dout = din), the
// setting the combiner uses for its PFIFOs in DRL mode. The buffer is a plain
// shift register, as a first-in first-out buffer with one write and one read
// every clock is. Lengths come from the design description: N-1 in the first
// PE of every row for DRL, N*M-1, N*M-2, ... for PRL, and M in the combiner.
// len above MAX_LEN is treated as MAX_LEN.
module pfifo #(
  parameter int unsigned W       = 8,
  parameter int unsigned MAX_LEN = 14
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_LEN+1)-1:0] len,
  input  logic [W-1:0]                 din,
  output logic [W-1:0]                 dout
);

  logic [W-1:0] sr [MAX_LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(MAX_LEN); k++) sr[k] <= '0;
    end else begin
      sr[0] <= din;
      for (int k = 1; k < int'(MAX_LEN); k++) sr[k] <= sr[k-1];
    end
  end

  always_comb begin
    if (len == 0)
      dout = din;
    else if (int'(len) >= int'(MAX_LEN))
      dout = sr[MAX_LEN-1];
    else
      dout = sr[len-1];
  end

endmodule
