// relax_top: programmable parallel architecture for discrete (DRL) and
// probabilistic (PRL) relaxation labeling.
//
// Data path: stream_ctrl -> main_array (M systolic rows) -> combiner ->
// status_check -> back to stream_ctrl. The host preloads the compatibility
// coefficients into the PEs' rings (coef_*), shifts the initial estimates into
// the label buffer (lbl_*), selects the mode and pulses start. The array then
// iterates on its own, one new estimate per clock on r_out (r_valid high,
// p_out the old estimate beside it), checks consistency / convergence itself
// and raises done with the final estimates in the label buffer.
// Timing for N = 5, M = 3, counted from the clock the first estimate is on the
// rows' X input: DRL first new estimate after 24 clocks, one iteration every
// 26 clocks; PRL first new estimate after 66 clocks, the last after 80, one
// iteration every 68 clocks.
// Estimates in DRL: bit t-1 of a word is label lambda_t. In PRL: signed,
// 6 fraction bits (1.0 = 64). Coefficients likewise (DRL: bit p-1 of the word
// for PE k of row t is C_ij(lambda_t, lambda_p)).
module relax_top
  import relax_pkg::*;
#(
  parameter int unsigned N = N_OBJ,
  parameter int unsigned M = M_LAB,
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned EW = (N * M > 1) ? $clog2(N * M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  input  logic          start,
  input  logic [15:0]   max_iter,
  input  logic [DW-1:0] eps,
  input  logic          coef_we,
  input  logic [RW-1:0] coef_row,
  input  logic [EW-1:0] coef_pe,
  input  logic [DW-1:0] coef_data,
  input  logic          lbl_we,
  input  logic [DW-1:0] lbl_din,
  input  logic          lbl_rd,
  output logic [DW-1:0] lbl_head,
  output logic [DW-1:0] r_out,
  output logic [DW-1:0] p_out,
  output logic          r_valid,
  output logic          status_valid,
  output logic          consistent,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [15:0]   iter_count
);

  logic [DW-1:0] x_in;
  logic [YW-1:0] y_in;
  logic          tag_in;
  logic [YW-1:0] y_rows [M];
  logic          y_tag;
  logic [DW-1:0] w_rows [M];
  logic [DW-1:0] fb_data;
  logic          fb_valid, fb_first;

  stream_ctrl #(.N(N), .M(M)) u_ctrl (
    .clk, .rst_n, .mode, .start, .max_iter,
    .lbl_we, .lbl_din, .lbl_rd, .lbl_head,
    .fb_data, .fb_valid, .fb_first, .status_valid, .consistent,
    .x_in, .y_in, .tag_in, .busy, .done, .converged, .iter_count
  );

  main_array #(.N(N), .M(M)) u_array (
    .clk, .rst_n, .mode,
    .coef_we, .coef_row, .coef_pe, .coef_data,
    .x_in, .y_in, .tag_in,
    .y_rows, .y_tag, .w_rows
  );

  combiner #(.M(M)) u_comb (
    .clk, .rst_n, .mode,
    .y_rows, .y_tag, .w_rows,
    .r_out, .p_out, .r_valid
  );

  status_check #(.N(N), .M(M)) u_check (
    .clk, .rst_n, .mode, .eps,
    .r_out, .p_out, .r_valid,
    .status_valid, .consistent,
    .fb_data, .fb_valid, .fb_first
  );

endmodule
