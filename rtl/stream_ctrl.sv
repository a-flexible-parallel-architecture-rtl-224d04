// stream_ctrl: input-stream sequencer, label buffer and iteration control,
// the single I/O port of the array.
//
// Each iteration sends the len estimates of the current labeling
// (len = N label vectors in DRL, N*M real numbers in PRL) into X_in twice in
// a row, 2*len clocks, then zeros; two copies are needed because each PE
// pairs its partial product with an estimate one position earlier in the
// cyclic stream than the previous PE. Y_in carries the identity of the row
// operation (1 for the DRL AND, 0 for the PRL sum) and a tag during the len
// clocks starting at the last estimate of the first copy; the tag marks the
// live result slots. y_in is as wide as the Y line it feeds, but only its
// bit 0 ever changes; the upper bits are constant zero by design.
// Iteration 0 reads the estimates the host shifted into the label buffer
// (lbl_we / lbl_din while idle). Later iterations start on their own: the
// first copy is the combiner's new estimates, fed back two clocks after they
// appear (fb_*), and is written into the buffer; the second copy is read back
// from it. So a new iteration starts 2 clocks after the previous one's first
// result: every 4N+6 clocks in DRL (26 for N = 5) and 4NM+M+5 in PRL (68).
// When status_check reports consistency / convergence, or max_iter
// iterations have been checked, the iteration already under way is cut after
// its first copy (no tags, so it yields no results), which leaves the final
// estimates in the buffer; done rises and the buffer can be read by rotating
// it with lbl_rd (lbl_head is its first entry). The stream format and timing
// follow the design description's tables; the buffer, the stop rule, the
// iteration limit and the host interface are this design's choices.
module stream_ctrl
  import relax_pkg::*;
#(
  parameter int unsigned N = N_OBJ,
  parameter int unsigned M = M_LAB,
  localparam int unsigned LMAX = N * M,
  localparam int unsigned PHW  = $clog2(2 * LMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  input  logic          start,
  input  logic [15:0]   max_iter,
  input  logic          lbl_we,
  input  logic [DW-1:0] lbl_din,
  input  logic          lbl_rd,
  output logic [DW-1:0] lbl_head,
  input  logic [DW-1:0] fb_data,
  input  logic          fb_valid,
  input  logic          fb_first,
  input  logic          status_valid,
  input  logic          consistent,
  output logic [DW-1:0] x_in,
  output logic [YW-1:0] y_in,
  output logic          tag_in,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [15:0]   iter_count
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e         state;
  logic [PHW-1:0] ph;          // clock of the current iteration seen at x_in
  logic           first_iter;
  logic           stop_req;
  logic [DW-1:0]  lbuf [LMAX];
  logic [PHW-1:0] len;

  assign len      = (mode == MODE_DRL) ? PHW'(N) : PHW'(LMAX);
  assign lbl_head = lbuf[0];
  assign y_in     = (mode == MODE_DRL) ? YW'(1) : '0;
  assign busy     = (state == S_RUN);
  assign done     = (state == S_DONE);

  // Shift value v into the buffer tail (entry len-1), advancing the rest.
  task automatic push(input logic [DW-1:0] v);
    for (int k = 0; k < int'(LMAX); k++) begin
      if (k + 1 < int'(len))       lbuf[k] <= lbuf[k+1];
      else if (k + 1 == int'(len)) lbuf[k] <= v;
    end
  endtask

  function automatic logic tag_at(input logic [PHW-1:0] p, input logic [PHW-1:0] l);
    return (p >= l - 1'b1) && (p <= 2 * l - 2);
  endfunction

  logic           stop_now, stop;
  logic [PHW-1:0] ph_n;

  always_comb begin
    stop_now = (state == S_RUN) && status_valid &&
               (consistent || (iter_count + 16'd1 >= max_iter));
    stop     = stop_req || stop_now;
    ph_n     = (ph < 2 * len) ? ph + 1'b1 : ph;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ph <= '0; first_iter <= 1'b0; stop_req <= 1'b0;
      x_in <= '0; tag_in <= 1'b0; converged <= 1'b0; iter_count <= '0;
      for (int k = 0; k < int'(LMAX); k++) lbuf[k] <= '0;
    end else begin
      x_in   <= '0;
      tag_in <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_RUN;
            ph         <= '0;
            first_iter <= 1'b1;
            stop_req   <= 1'b0;
            converged  <= 1'b0;
            iter_count <= '0;
            x_in       <= lbuf[0];
            tag_in     <= tag_at('0, len);
            push(lbuf[0]);
          end else if (lbl_we) begin
            push(lbl_din);
          end else if (lbl_rd) begin
            push(lbuf[0]);
          end
        end
        S_RUN: begin
          if (status_valid) begin
            iter_count <= iter_count + 16'd1;
            if (consistent) converged <= 1'b1;
          end
          if (stop_now) stop_req <= 1'b1;
          if (fb_valid && fb_first && !stop) begin
            // next iteration: first copy comes straight from the combiner
            ph         <= '0;
            first_iter <= 1'b0;
            x_in       <= fb_data;
            tag_in     <= tag_at('0, len);
            push(fb_data);
          end else begin
            ph <= ph_n;
            if (ph_n < len) begin
              x_in   <= first_iter ? lbuf[0] : fb_data;
              tag_in <= !stop && tag_at(ph_n, len);
              push(first_iter ? lbuf[0] : fb_data);
            end else if (ph_n < 2 * len) begin
              if (stop) begin
                state <= S_DONE;
              end else begin
                x_in   <= lbuf[0];
                tag_in <= tag_at(ph_n, len);
                push(lbuf[0]);
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
