// relax_pe: processing element of the one-dimensional, one-way systolic rows.
//
// Three pipeline stages carry three lines through the PE:
//   PFIFO stage  x_r, y_1, w_1   (the first PE of a row takes W from its own
//                                 PFIFO, which delays X_in; later PEs take W_in)
//   I stage      i_r = f(top coefficient, x_r), y_2, w_2
//   A stage      a_r = g(y_2, i_r)  -> Y_out,  x_3, w_3 -> W_out
// and a one-clock Z buffer after the A stage on the X line. So Y and W take
// 3 clocks per PE and X takes 4: X runs one clock behind Y at every PE, which
// is what pairs the k-th partial product with the right estimate.
//   DRL: f = OR_p (C(p) AND L(p)) over the M-bit label vector (a two-level
//        NAND circuit), g = AND.  PRL: f = C x P (fixed point), g = saturating add.
// A one-bit tag travels with Y and marks live result slots; while the tag sits
// in the PFIFO stage the I stage uses the top coefficient and the coefficient
// ring advances (the tag is this design's way of stepping the ring).
// Coefficients are preloaded through coef_ld / coef_din (see coef_ring).
// HAS_PFIFO = 1 builds the first PE of a row, whose W comes from its PFIFO
// (w_in is then unused); later PEs take W from w_in and leave pfifo_len
// unused. Both inputs stay so that every PE has the same ports.
// Structure and stage timing follow the design description; the tag, the
// reset values and the fixed-point format are this design's choices.
module relax_pe
  import relax_pkg::*;
#(
  parameter int unsigned M         = M_LAB,
  parameter int unsigned MAX_RING  = N_OBJ * M_LAB,
  parameter int unsigned MAX_FIFO  = N_OBJ * M_LAB - 1,
  parameter bit          HAS_PFIFO = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  mode_e                         mode,
  input  logic [$clog2(MAX_FIFO+1)-1:0] pfifo_len,
  input  logic [$clog2(MAX_RING+1)-1:0] ring_len,
  input  logic                          coef_ld,
  input  logic [DW-1:0]                 coef_din,
  input  logic [DW-1:0]                 x_in,
  input  logic [YW-1:0]                 y_in,
  input  logic                          tag_in,
  input  logic [DW-1:0]                 w_in,
  output logic [DW-1:0]                 x_out,
  output logic [YW-1:0]                 y_out,
  output logic                          tag_out,
  output logic [DW-1:0]                 w_out
);

  logic [DW-1:0] x_r, x_2, x_3, z_r;
  logic [YW-1:0] y_1, y_2, i_r, a_r;
  logic          t_1, t_2, t_a;
  logic [DW-1:0] w_1, w_2, w_3;
  logic [DW-1:0] w_src, c_top;
  logic [YW-1:0] i_next, a_next;

  coef_ring #(.W(DW), .MAX_LEN(MAX_RING)) u_ring (
    .clk, .rst_n, .len(ring_len), .rot(t_1), .load(coef_ld), .din(coef_din), .top(c_top)
  );

  if (HAS_PFIFO) begin : g_pfifo
    pfifo #(.W(DW), .MAX_LEN(MAX_FIFO)) u_pfifo (
      .clk, .rst_n, .len(pfifo_len), .din(x_in), .dout(w_src)
    );
  end else begin : g_wline
    assign w_src = w_in;
  end

  // I stage: DRL two-level AND-OR over the label vector, PRL multiplier.
  always_comb begin
    if (mode == MODE_DRL)
      i_next = YW'(|(c_top[M-1:0] & x_r[M-1:0]));
    else
      i_next = fx_mul(c_top, x_r);
  end

  // A stage: DRL AND of the partial product, PRL adder of the partial sum.
  always_comb begin
    if (mode == MODE_DRL)
      a_next = YW'(y_2[0] & i_r[0]);
    else
      a_next = sat_add(y_2, i_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0; x_2 <= '0; x_3 <= '0; z_r <= '0;
      y_1 <= '0; y_2 <= '0; i_r <= '0; a_r <= '0;
      t_1 <= 1'b0; t_2 <= 1'b0; t_a <= 1'b0;
      w_1 <= '0; w_2 <= '0; w_3 <= '0;
    end else begin
      // PFIFO stage
      x_r <= x_in;  y_1 <= y_in;  t_1 <= tag_in;  w_1 <= w_src;
      // I stage
      x_2 <= x_r;   y_2 <= y_1;   t_2 <= t_1;     w_2 <= w_1;  i_r <= i_next;
      // A stage
      x_3 <= x_2;   a_r <= a_next; t_a <= t_2;    w_3 <= w_2;
      // Z buffer
      z_r <= x_3;
    end
  end

  assign x_out   = z_r;
  assign y_out   = a_r;
  assign tag_out = t_a;
  assign w_out   = w_3;

endmodule
