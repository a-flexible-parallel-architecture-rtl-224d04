// coef_ring: circular shift register holding the compatibility coefficients
// of one processing element.
//
// The coefficients are preloaded before a run and then circulate, so that only
// the stream of labeling estimates has to move through the array. Entry 0 is
// the top, the coefficient the PE's I stage uses in the current clock.
// `len` sets the active ring length (N in DRL, N*M in PRL). On `rot` the ring
// advances by one: entry k takes entry k+1 and the top wraps round to entry
// len-1. On `load` (ignored while rot is high) the ring shifts the same way
// but entry len-1 takes `din`, so after len loads the first value written is
// on top. Advancing only when the PE's slot is live (rather than every clock)
// is this design's choice; it keeps the ring aligned however long the pause
// between iterations is.
module coef_ring #(
  parameter int unsigned W       = 8,
  parameter int unsigned MAX_LEN = 15
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_LEN+1)-1:0] len,
  input  logic                         rot,
  input  logic                         load,
  input  logic [W-1:0]                 din,
  output logic [W-1:0]                 top
);

  logic [W-1:0] ring [MAX_LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(MAX_LEN); k++) ring[k] <= '0;
    end else if (rot || load) begin
      for (int k = 0; k < int'(MAX_LEN); k++) begin
        if (k + 1 < int'(len))
          ring[k] <= ring[k+1];
        else if (k + 1 == int'(len))
          ring[k] <= rot ? ring[0] : din;
      end
    end
  end

  assign top = ring[0];

endmodule
