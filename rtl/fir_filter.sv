// fir_filter: complex 31-tap FIR that convolves a 31-sample complex waveform
// with one of the four stored target responses, giving the 61-sample result.
//
// A 31-word input buffer per channel (in-phase and quadrature) is cleared at
// the start. On each of 61 clocks one input sample enters the buffer (x[0]
// first; zeros after x[30]) while the contents move one place along, so the
// buffer holds x[n], x[n-1], .. x[n-30]. Four real dot products with the taps
// of the selected response h = h_re + j*h_im are formed in parallel and
// combined into one output sample:
//   y[n]   = sum(x_re*h_re) - sum(x_im*h_im)     (in-phase)
//   y_j[n] = sum(x_re*h_im) + sum(x_im*h_re)     (quadrature)
// Every product is a Q15.16 multiply (64-bit product >> 16). The buffer, the
// 61-step count, the four parallel filters and the response table are the
// document's; the single-cycle dot product and the handshake timing are this
// design's.
//
// Interface: enable/complete handshake. sel is taken when fir_en is seen high
// in idle; x and x_j must stay valid while fir_en is high. One output sample
// is written per clock on the next 61 edges; fir_complete rises with the last
// of them, 62 edges after fir_en is first high (the edge that sees it
// included), and is held, with y and y_j, until fir_en falls.
module fir_filter
  import crr_pkg::*;
  import crr_tables_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  logic       fir_en,
  input  logic [1:0] sel,
  input  q16_t       x   [N_TAPS],
  input  q16_t       x_j [N_TAPS],
  output q16_t       y   [N_CONV],
  output q16_t       y_j [N_CONV],
  output logic       fir_complete
);

  // Stored target responses, N_HYP x N_TAPS complex taps.
  q16_t h_re [N_HYP][N_TAPS];
  q16_t h_im [N_HYP][N_TAPS];
  for (genvar t = 0; t < N_HYP; t++) begin : g_hyp
    for (genvar n = 0; n < N_TAPS; n++) begin : g_tap
      assign h_re[t][n] = h_re_q(t, n);
      assign h_im[t][n] = h_im_q(t, n);
    end
  end

  hs_state_e  state;
  logic [1:0] sel_q;
  logic [5:0] fir_count;
  q16_t       buf_re [N_TAPS];
  q16_t       buf_im [N_TAPS];

  // Buffer contents after this clock's shift, and the output sample they give.
  q16_t nxt_re [N_TAPS];
  q16_t nxt_im [N_TAPS];
  q16_t acc_rr, acc_ii, acc_ri, acc_ir;

  always_comb begin
    nxt_re[0] = (fir_count < 6'(N_TAPS)) ? x[5'(fir_count)]   : '0;
    nxt_im[0] = (fir_count < 6'(N_TAPS)) ? x_j[5'(fir_count)] : '0;
    for (int k = 1; k < N_TAPS; k++) begin
      nxt_re[k] = buf_re[k-1];
      nxt_im[k] = buf_im[k-1];
    end
    acc_rr = '0;
    acc_ii = '0;
    acc_ri = '0;
    acc_ir = '0;
    for (int k = 0; k < N_TAPS; k++) begin
      acc_rr += qmul(nxt_re[k], h_re[sel_q][k]);
      acc_ii += qmul(nxt_im[k], h_im[sel_q][k]);
      acc_ri += qmul(nxt_re[k], h_im[sel_q][k]);
      acc_ir += qmul(nxt_im[k], h_re[sel_q][k]);
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state        <= HS_IDLE;
      sel_q        <= '0;
      fir_count    <= '0;
      fir_complete <= 1'b0;
      for (int k = 0; k < N_TAPS; k++) begin
        buf_re[k] <= '0;
        buf_im[k] <= '0;
      end
      for (int n = 0; n < N_CONV; n++) begin
        y[n]   <= '0;
        y_j[n] <= '0;
      end
    end else begin
      unique case (state)
        HS_IDLE: begin
          fir_complete <= 1'b0;
          if (fir_en) begin
            sel_q     <= sel;
            fir_count <= '0;
            for (int k = 0; k < N_TAPS; k++) begin
              buf_re[k] <= '0;
              buf_im[k] <= '0;
            end
            state <= HS_BUSY;
          end
        end
        HS_BUSY: begin
          buf_re <= nxt_re;
          buf_im <= nxt_im;
          y[fir_count]   <= acc_rr - acc_ii;
          y_j[fir_count] <= acc_ri + acc_ir;
          fir_count      <= fir_count + 6'd1;
          if (fir_count == 6'(N_CONV - 1)) begin
            fir_complete <= 1'b1;
            state        <= HS_DONE;
          end
        end
        HS_DONE: begin
          if (!fir_en) begin
            fir_complete <= 1'b0;
            state        <= HS_IDLE;
          end
        end
        default: state <= HS_IDLE;
      endcase
    end
  end

endmodule
