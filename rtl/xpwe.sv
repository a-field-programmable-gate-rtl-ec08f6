// xpwe: adaptive PWE transmit waveform generator.
//
// Builds the "probability of weighted energy" waveform from the four stored
// eigenwaveforms se_i (31 complex samples each):
//   x_pwe[n] = sum_i sqrt(ptheta_i) * se_i[n]
//   x[n]     = sqrt(Es) * x_pwe[n] / sqrt(E_pwe),  E_pwe = sum_n |x_pwe[n]|^2
// so the transmitted waveform leans towards the eigenwaveforms of the more
// probable targets and always carries the energy Es. It runs the document's
// ten-step sequence: idle, read inputs, four square roots of the
// probabilities in parallel, x_pwe and its energy, square root of the energy
// (on the first square-root unit again), its reciprocal on a divider, then
// the scaled output and a completion signal.
//
// With NORMALIZE = 0 (the configuration of the hardware radar processor) the
// energy, square-root-of-energy and division steps are skipped, no divider is
// built, squareroot_Es_input is ignored and x = x_pwe; the transmit power is
// then set by the RF equipment. The sample-serial computation of x_pwe and x
// (one sample per clock, 31 clocks each) is this design's choice.
//
// Interface: enable/complete handshake. ptheta and squareroot_Es_input are
// taken on the edge after xpwe_en is seen high in idle. The latency is
// dominated by the linear-search square roots: about 65536*sqrt(max ptheta)
// clocks, plus about 65536*sqrt(E_pwe) + 50 clocks when normalizing, plus
// 2*31 + 5 clocks. s, s_j and xpwe_complete are held until xpwe_en falls.
module xpwe
  import crr_pkg::*;
  import crr_tables_pkg::*;
#(
  parameter bit NORMALIZE = 1'b1
) (
  input  logic clk,
  input  logic reset_n,
  input  logic xpwe_en,
  input  q16_t ptheta [N_HYP],
  input  q16_t squareroot_Es_input,
  output q16_t s   [N_TAPS],
  output q16_t s_j [N_TAPS],
  output logic xpwe_complete
);

  // Stored eigenwaveforms.
  q16_t se_re [N_HYP][N_TAPS];
  q16_t se_im [N_HYP][N_TAPS];
  for (genvar t = 0; t < N_HYP; t++) begin : g_hyp
    for (genvar n = 0; n < N_TAPS; n++) begin : g_smp
      assign se_re[t][n] = se_re_q(t, n);
      assign se_im[t][n] = se_im_q(t, n);
    end
  end

  typedef enum logic [3:0] {
    X_IDLE, X_INIT, X_SQRT_P, X_ENERGY, X_SQRT_E, X_READ_SQRT_E,
    X_DIV, X_READ_DIV, X_GEN, X_EXIT
  } xpwe_state_e;

  xpwe_state_e state;
  q16_t        p_q [N_HYP];
  q16_t        sp  [N_HYP];       // sqrt(ptheta_i)
  q16_t        es_q;              // sqrt(Es)
  q16_t        xp_re [N_TAPS];    // x_pwe
  q16_t        xp_im [N_TAPS];
  q16_t        energy;            // E_pwe
  q16_t        sqrt_e;
  q16_t        inv_sqrt_e;
  logic [4:0]  n_idx;

  // Square-root units: unit 0 also serves the energy normalization.
  logic [N_HYP-1:0] sq_en, sq_done;
  q16_t             sq_in  [N_HYP];
  q16_t             sq_out [N_HYP];

  for (genvar i = 0; i < N_HYP; i++) begin : g_sqrt
    if (i == 0) begin : g_shared
      assign sq_in[i] = (state == X_SQRT_E || state == X_READ_SQRT_E) ? energy : p_q[i];
    end else begin : g_plain
      assign sq_in[i] = p_q[i];
    end
    squareroot u_sqrt (
      .clk           (clk),
      .reset_n       (reset_n),
      .sqrt_en       (sq_en[i]),
      .sqrt_input    (sq_in[i]),
      .sqrt_result   (sq_out[i]),
      .sqrt_complete (sq_done[i])
    );
  end

  // Divider for 1/sqrt(E_pwe), built only when normalizing.
  logic div_en, div_done;
  q16_t div_q;
  if (NORMALIZE) begin : g_div
    division u_div (
      .clk               (clk),
      .reset_n           (reset_n),
      .division_en       (div_en),
      .dividend          (Q_ONE),
      .divisor           (sqrt_e),
      .quotient          (div_q),
      .division_complete (div_done)
    );
  end else begin : g_no_div
    assign div_q    = Q_ONE;
    assign div_done = 1'b1;
  end

  // x_pwe for sample n_idx.
  q16_t cur_re, cur_im;
  always_comb begin
    cur_re = '0;
    cur_im = '0;
    for (int i = 0; i < N_HYP; i++) begin
      cur_re += qmul(sp[i], se_re[i][n_idx]);
      cur_im += qmul(sp[i], se_im[i][n_idx]);
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state         <= X_IDLE;
      sq_en         <= '0;
      div_en        <= 1'b0;
      es_q          <= '0;
      energy        <= '0;
      sqrt_e        <= '0;
      inv_sqrt_e    <= '0;
      n_idx         <= '0;
      xpwe_complete <= 1'b0;
      for (int i = 0; i < N_HYP; i++) begin
        p_q[i] <= '0;
        sp[i]  <= '0;
      end
      for (int n = 0; n < N_TAPS; n++) begin
        xp_re[n] <= '0;
        xp_im[n] <= '0;
        s[n]     <= '0;
        s_j[n]   <= '0;
      end
    end else begin
      unique case (state)
        X_IDLE: begin
          if (xpwe_en) state <= X_INIT;
        end
        X_INIT: begin
          p_q   <= ptheta;
          es_q  <= squareroot_Es_input;
          sq_en <= '1;
          state <= X_SQRT_P;
        end
        X_SQRT_P: begin
          for (int i = 0; i < N_HYP; i++)
            if (sq_done[i]) sq_en[i] <= 1'b0;
          if (&(sq_done | ~sq_en)) begin
            sp     <= sq_out;   // results stay valid after each unit is released
            n_idx  <= '0;
            energy <= '0;
            state  <= X_ENERGY;
          end
        end
        X_ENERGY: begin
          xp_re[n_idx] <= cur_re;
          xp_im[n_idx] <= cur_im;
          energy       <= energy + qmul(cur_re, cur_re) + qmul(cur_im, cur_im);
          n_idx        <= n_idx + 5'd1;
          if (n_idx == 5'(N_TAPS - 1)) begin
            n_idx <= '0;
            if (NORMALIZE) begin
              state <= X_SQRT_E;
            end else begin
              inv_sqrt_e <= Q_ONE;
              state      <= X_GEN;
            end
          end
        end
        X_SQRT_E: begin
          sq_en[0] <= 1'b1;
          state    <= X_READ_SQRT_E;
        end
        X_READ_SQRT_E: begin
          if (sq_done[0]) begin
            sqrt_e   <= sq_out[0];
            sq_en[0] <= 1'b0;
            state    <= X_DIV;
          end
        end
        X_DIV: begin
          div_en <= 1'b1;
          state  <= X_READ_DIV;
        end
        X_READ_DIV: begin
          if (div_done && div_en) begin
            inv_sqrt_e <= div_q;
            div_en     <= 1'b0;
            state      <= X_GEN;
          end
        end
        X_GEN: begin
          if (NORMALIZE) begin
            s[n_idx]   <= qmul(qmul(xp_re[n_idx], inv_sqrt_e), es_q);
            s_j[n_idx] <= qmul(qmul(xp_im[n_idx], inv_sqrt_e), es_q);
          end else begin
            s[n_idx]   <= xp_re[n_idx];
            s_j[n_idx] <= xp_im[n_idx];
          end
          n_idx <= n_idx + 5'd1;
          if (n_idx == 5'(N_TAPS - 1)) begin
            xpwe_complete <= 1'b1;
            state         <= X_EXIT;
          end
        end
        X_EXIT: begin
          if (!xpwe_en) begin
            xpwe_complete <= 1'b0;
            state         <= X_IDLE;
          end
        end
        default: state <= X_IDLE;
      endcase
    end
  end

endmodule
