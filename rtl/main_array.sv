// main_array: the main module, M systolic rows of N*M processing elements.
//
// Row t (t = 0..M-1) holds the coefficients C_ij(lambda_t+1, .) and computes
// S_i(lambda_t+1) for every object; all rows work simultaneously on the same
// X_in / Y_in stream, so the M evidences of one object leave the rows in the
// same clock. The rows differ only in the length of the PFIFO in their first
// PE, which delays the W line: N-1 for every row in DRL (so the old label
// vector meets the evidences at the combiner), and N*M-1-t in PRL (so row t
// delivers P_i(lambda_t+1) just when the combiner loads S_i(lambda_1..M)).
// Coefficient preload (this design's interface): coef_we with coef_row and
// coef_pe (0-based) shifts coef_data into that PE's ring; write a PE's ring
// length of entries, first the one for result slot 1.
module main_array
  import relax_pkg::*;
#(
  parameter int unsigned N = N_OBJ,
  parameter int unsigned M = M_LAB,
  localparam int unsigned NPE = N * M,
  localparam int unsigned FW  = $clog2(NPE),
  localparam int unsigned RW  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned EW  = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  input  logic          coef_we,
  input  logic [RW-1:0] coef_row,
  input  logic [EW-1:0] coef_pe,
  input  logic [DW-1:0] coef_data,
  input  logic [DW-1:0] x_in,
  input  logic [YW-1:0] y_in,
  input  logic          tag_in,
  output logic [YW-1:0] y_rows [M],
  output logic          y_tag,
  output logic [DW-1:0] w_rows [M]
);

  logic tags [M];

  for (genvar t = 0; t < int'(M); t++) begin : g_row
    logic [FW-1:0]  plen;
    logic [NPE-1:0] ld;

    assign plen = (mode == MODE_DRL) ? FW'(N - 1) : FW'(NPE - 1 - t);
    always_comb begin
      ld = '0;
      if (coef_we && int'(coef_row) == t && int'(coef_pe) < int'(NPE))
        ld[coef_pe] = 1'b1;
    end

    pe_row #(.N(N), .M(M)) u_row (
      .clk, .rst_n, .mode,
      .pfifo_len(plen), .coef_ld(ld), .coef_din(coef_data),
      .x_in, .y_in, .tag_in,
      .y_out(y_rows[t]), .tag_out(tags[t]), .w_out(w_rows[t])
    );
  end

  // All rows carry the same tag; row 0's is used.
  assign y_tag = tags[0];

endmodule
