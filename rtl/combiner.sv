// combiner: forms the new labeling estimates from the M rows' supporting
// evidences (Y) and the delayed old estimates (W).
//
// Five programmable stages, configured by `mode`:
//   stage   DRL                                PRL
//   G / H   parallel in, parallel out          parallel in, serial out (PISO):
//           G = {S_i(lambda_1..M)}, H = L_i    G = S_i(lambda_1..M), H = P_i(lambda_1..M)
//                                              loaded once every M slots, shifted out
//   A       no operation                       1 + S (constant buffer holds 1.0)
//   I       L AND S                            (1 + S) x P  -> numerator
//   ACC     no operation (one register)        accumulates the M numerators of an object;
//                                              PFIFO1 / PFIFO2 (length M) carry the
//                                              numerator and the old estimate past it
//   D       no operation                       numerator / sum
// Latency from the rows' outputs to r_out: 5 clocks in DRL, M + 4 in PRL
// (7 for M = 3), one result per clock. p_out is the old estimate aligned
// with r_out; r_valid marks live results (derived from the rows' tag).
// The stage functions and latencies follow the design description. This
// design's own choices: the fixed-point format of relax_pkg, wider internal
// numerators and sums (so only the divider's result returns to 8 bits),
// clamping 1 + S and the numerator at zero, a result of 0 for a zero sum, and
// a quotient limited to 1.0.
module combiner
  import relax_pkg::*;
#(
  parameter int unsigned M = M_LAB,
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = YW + DW,
  localparam int unsigned AW = NW + $clog2(M + 1),
  localparam int unsigned DLW = $clog2(M + 1),
  localparam int unsigned GN  = (M > 1) ? M - 1 : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  input  logic [YW-1:0]     y_rows [M],
  input  logic              y_tag,
  input  logic [DW-1:0]     w_rows [M],
  output logic [DW-1:0]     r_out,
  output logic [DW-1:0]     p_out,
  output logic              r_valid
);

  localparam logic signed [YW-1:0] ONE = YW'(1 << FRAC);

  // ---------------- G / H stage ----------------
  logic [YW-1:0] g_sh [GN];         // PISO shift registers (PRL), elements 2..M
  logic [DW-1:0] h_sh [GN];
  logic [YW-1:0] s1;
  logic [DW-1:0] p1;
  logic          v1;
  logic [PW-1:0] pos1;
  logic [PW-1:0] slot_cnt;          // live slots seen, modulo M (PRL)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(GN); k++) begin g_sh[k] <= '0; h_sh[k] <= '0; end
      s1 <= '0; p1 <= '0; v1 <= 1'b0; pos1 <= '0; slot_cnt <= '0;
    end else if (mode == MODE_DRL) begin
      for (int k = 0; k < int'(M); k++) s1[k] <= y_rows[k][0];
      s1[YW-1:M] <= '0;
      p1       <= w_rows[0];
      v1       <= y_tag;
      pos1     <= '0;
      slot_cnt <= '0;
    end else begin
      if (!y_tag)
        slot_cnt <= '0;
      else
        slot_cnt <= (int'(slot_cnt) == int'(M) - 1) ? '0 : slot_cnt + 1'b1;
      if (y_tag && slot_cnt == '0) begin
        // parallel load; element 0 goes straight to the serial output
        s1   <= y_rows[0];
        p1   <= w_rows[0];
        for (int k = 0; k + 1 < int'(M); k++) begin
          g_sh[k] <= y_rows[k+1];
          h_sh[k] <= w_rows[k+1];
        end
        v1   <= 1'b1;
        pos1 <= '0;
      end else if (v1 && int'(pos1) < int'(M) - 1) begin
        s1   <= g_sh[0];
        p1   <= h_sh[0];
        for (int k = 0; k + 2 < int'(M); k++) begin
          g_sh[k] <= g_sh[k+1];
          h_sh[k] <= h_sh[k+1];
        end
        pos1 <= pos1 + 1'b1;
      end else begin
        v1 <= 1'b0;
      end
    end
  end

  // ---------------- A stage ----------------
  logic [YW-1:0] s2;
  logic [DW-1:0] p2;
  logic          v2;
  logic [PW-1:0] pos2;
  logic signed [YW-1:0] one_plus_s;

  assign one_plus_s = sat_add(ONE, s1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0; p2 <= '0; v2 <= 1'b0; pos2 <= '0;
    end else begin
      if (mode == MODE_DRL) s2 <= s1;
      else                  s2 <= one_plus_s[YW-1] ? '0 : one_plus_s;
      p2 <= p1; v2 <= v1; pos2 <= pos1;
    end
  end

  // ---------------- I stage ----------------
  logic signed [NW-1:0] n3;
  logic [DW-1:0] p3;
  logic          v3;
  logic [PW-1:0] pos3;
  logic signed [NW-1:0] prod;

  assign prod = $signed({1'b0, s2}) * $signed(p2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n3 <= '0; p3 <= '0; v3 <= 1'b0; pos3 <= '0;
    end else begin
      if (mode == MODE_DRL) n3 <= NW'(p2[M-1:0] & s2[M-1:0]);
      else                  n3 <= prod[NW-1] ? '0 : prod;
      p3 <= p2; v3 <= v2; pos3 <= pos2;
    end
  end

  // ---------------- ACC stage, PFIFO1 / PFIFO2 ----------------
  logic signed [AW-1:0] acc, sum_hold;
  logic [DLW-1:0] dly_len;
  localparam int unsigned BW = NW + DW + 1 + PW;
  logic [BW-1:0] dly_in, dly_out;
  logic signed [NW-1:0] n4;
  logic [DW-1:0] p4;
  logic          v4;
  logic [PW-1:0] pos4;

  // DRL: the NOP ACC stage is one register. PRL: PFIFO1/2 of length M.
  assign dly_len = (mode == MODE_DRL) ? DLW'(1) : DLW'(M);
  assign dly_in  = {n3, p3, v3, pos3};

  pfifo #(.W(BW), .MAX_LEN(M)) u_pfifo12 (
    .clk, .rst_n, .len(dly_len), .din(dly_in), .dout(dly_out)
  );
  assign {n4, p4, v4, pos4} = dly_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (mode == MODE_PRL && v3) begin
      if (pos3 == '0) acc <= AW'(n3);
      else            acc <= acc + AW'(n3);
    end
  end

  // ---------------- D stage ----------------
  logic signed [AW-1:0] divisor;
  logic [DW-1:0] quot;

  assign divisor = (pos4 == '0) ? acc : sum_hold;

  always_comb begin
    logic signed [AW+FRAC-1:0] q;
    q = '0;
    if (divisor <= 0 || n4 <= 0) begin
      quot = '0;
    end else begin
      q = ((AW+FRAC)'(n4) <<< FRAC) / (AW+FRAC)'(divisor);
      if (q > (AW+FRAC)'(1 << FRAC)) quot = DW'(1 << FRAC);
      else                           quot = q[DW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_out <= '0; p_out <= '0; r_valid <= 1'b0; sum_hold <= '0;
    end else begin
      if (mode == MODE_DRL) r_out <= DW'(n4[M-1:0]);
      else                  r_out <= quot;
      if (v4 && pos4 == '0) sum_hold <= acc;
      p_out   <= p4;
      r_valid <= v4;
    end
  end

endmodule
