// pe_row: one linear systolic row of processing elements.
//
// Row t computes the supporting evidence S_i(lambda_t) of every object i.
// X (labeling estimates), Y (partial results, with their tag) and W (delayed
// estimates for the combiner) enter at PE 1 and flow one way to the end.
// Only the first PE holds a PFIFO. The row has NPE = N*M PEs, the PRL length;
// in DRL only the first N are used and the row outputs are taken after PE N
// (a tap multiplexer, this design's way of letting one row length serve both
// algorithms). Row latency: the result of slot q leaves the row
// 3*len + (q-1) clocks after Y_in carried it, where len is N (DRL) or N*M (PRL).
// In DRL the tag is not passed beyond PE N. Change `mode` only while the
// array is idle.
// Coefficient preload: coef_ld[k] shifts coef_din into PE k+1's ring.
module pe_row
  import relax_pkg::*;
#(
  parameter int unsigned N = N_OBJ,
  parameter int unsigned M = M_LAB,
  localparam int unsigned NPE  = N * M,
  localparam int unsigned LW   = $clog2(NPE + 1),
  localparam int unsigned FW   = $clog2(NPE)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mode_e           mode,
  input  logic [FW-1:0]   pfifo_len,
  input  logic [NPE-1:0]  coef_ld,
  input  logic [DW-1:0]   coef_din,
  input  logic [DW-1:0]   x_in,
  input  logic [YW-1:0]   y_in,
  input  logic            tag_in,
  output logic [YW-1:0]   y_out,
  output logic            tag_out,
  output logic [DW-1:0]   w_out
);

  logic [DW-1:0] xs [NPE+1];
  logic [YW-1:0] ys [NPE+1];
  logic          ts [NPE+1];
  logic [DW-1:0] ws [NPE+1];
  logic [LW-1:0] ring_len;

  assign ring_len = (mode == MODE_DRL) ? LW'(N) : LW'(NPE);

  assign xs[0] = x_in;
  assign ys[0] = y_in;
  assign ts[0] = tag_in;
  assign ws[0] = '0;

  // In DRL the tag stops at the tap, so PEs beyond it never hold a live slot
  // that could surface after a switch to PRL.
  logic tg [NPE];
  for (genvar k = 0; k < int'(NPE); k++) begin : g_tag
    assign tg[k] = (mode == MODE_DRL && k >= int'(N)) ? 1'b0 : ts[k];
  end

  for (genvar k = 0; k < int'(NPE); k++) begin : g_pe
    relax_pe #(
      .M(M), .MAX_RING(NPE), .MAX_FIFO(NPE - 1), .HAS_PFIFO(k == 0)
    ) u_pe (
      .clk, .rst_n, .mode,
      .pfifo_len(pfifo_len), .ring_len(ring_len),
      .coef_ld(coef_ld[k]), .coef_din(coef_din),
      .x_in(xs[k]), .y_in(ys[k]), .tag_in(tg[k]), .w_in(ws[k]),
      .x_out(xs[k+1]), .y_out(ys[k+1]), .tag_out(ts[k+1]), .w_out(ws[k+1])
    );
  end

  always_comb begin
    if (mode == MODE_DRL) begin
      y_out = ys[N]; tag_out = ts[N]; w_out = ws[N];
    end else begin
      y_out = ys[NPE]; tag_out = ts[NPE]; w_out = ws[NPE];
    end
  end

endmodule
