// status_check: hardware check of the consistency condition (DRL) or the
// convergence condition (PRL), done without the host.
//
// One clock after each live result leaves the combiner, the new estimate
// (r_out) is compared with the old one (p_out): DRL requires them equal,
// PRL requires |new - old| <= eps. After the len-th live result of an
// iteration (len = N in DRL, N*M in PRL) status_valid pulses for one clock
// with `consistent` set if every comparison of that iteration held.
// The stage also registers the new estimates (fb_data / fb_valid / fb_first)
// for the feedback path to X_in, so a new estimate reaches X_in two clocks
// after it leaves the combiner. Comparing the R_out and P_out streams in the
// clock after the result is the description's scheme; the tolerance input
// eps and the counting of live results are this design's choices.
module status_check
  import relax_pkg::*;
#(
  parameter int unsigned N = N_OBJ,
  parameter int unsigned M = M_LAB,
  localparam int unsigned CW = $clog2(N * M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  input  logic [DW-1:0] eps,
  input  logic [DW-1:0] r_out,
  input  logic [DW-1:0] p_out,
  input  logic          r_valid,
  output logic          status_valid,
  output logic          consistent,
  output logic [DW-1:0] fb_data,
  output logic          fb_valid,
  output logic          fb_first
);

  logic [CW-1:0] cnt, len;
  logic          all_ok, match;
  logic signed [DW:0] diff;

  assign len  = (mode == MODE_DRL) ? CW'(N) : CW'(N * M);
  assign diff = $signed({r_out[DW-1], r_out}) - $signed({p_out[DW-1], p_out});

  always_comb begin
    if (mode == MODE_DRL)
      match = (r_out[M-1:0] == p_out[M-1:0]);
    else
      match = ((diff < 0) ? -diff : diff) <= $signed({1'b0, eps});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; all_ok <= 1'b1; status_valid <= 1'b0; consistent <= 1'b0;
      fb_data <= '0; fb_valid <= 1'b0; fb_first <= 1'b0;
    end else begin
      status_valid <= 1'b0;
      fb_data  <= r_out;
      fb_valid <= r_valid;
      fb_first <= r_valid && (cnt == '0);
      if (r_valid) begin
        if (cnt == len - 1'b1) begin
          cnt          <= '0;
          all_ok       <= 1'b1;
          status_valid <= 1'b1;
          consistent   <= all_ok && match;
        end else begin
          cnt    <= cnt + 1'b1;
          all_ok <= all_ok && match;
        end
      end
    end
  end

endmodule
