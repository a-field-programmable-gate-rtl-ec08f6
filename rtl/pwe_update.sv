// pwe_update: Bayesian probability update of the four target hypotheses from
// one received target return.
//
// For each hypothesis i = 0..3 the transmitted waveform x is convolved with
// the stored target response h_i on the FIR unit, giving the expected return
// S_i (61 complex samples). With the received return y the log-likelihood
// term is
//   L_i = 2*re(S_i^H y) - S_i^H S_i
// (the ||y||^2 term is common to all hypotheses and dropped). The likelihood
// is p_i = exp((L_i - max_j L_j) * inv_noise_var) from the exponential unit,
// and the new probabilities are
//   ptheta_out_i = p_i * ptheta_in_i / sum_j (p_j * ptheta_in_j)
// formed by four divisions, so they sum to one. The order of work - FIR,
// S^H S, 2 re(S^H y), their difference, repeated for each hypothesis, then
// the exponentials and the divisions - is the document's. Scaling the
// exponent by inv_noise_var (1/sigma^2 of the complex noise) and subtracting
// the largest L_j first, which keeps every exponent at or below zero and so
// inside the exponential unit's range, are this design's choices, as is
// keeping ptheta_in unchanged if every product p_i*ptheta_in_i underflows to
// zero.
//
// Interface: enable/complete handshake. x, y, ptheta_in and inv_noise_var
// must be held while update_en is high. The run takes about 4*(61+61+61+6) +
// 4*4 + 4*52 clocks (about 1000); ptheta_out and update_complete are then
// held until update_en falls.
module pwe_update
  import crr_pkg::*;
(
  input  logic clk,
  input  logic reset_n,
  input  logic update_en,
  input  q16_t x          [N_TAPS],
  input  q16_t x_j        [N_TAPS],
  input  q16_t yy         [N_CONV],
  input  q16_t yy_j       [N_CONV],
  input  q16_t ptheta_in  [N_HYP],
  input  q16_t inv_noise_var,
  output q16_t ptheta_out [N_HYP],
  output logic update_complete
);

  typedef enum logic [3:0] {
    U_IDLE, U_FIR_REQ, U_FIR_WAIT, U_SS, U_B, U_L, U_MAX,
    U_EXP_REQ, U_EXP_WAIT, U_NUM, U_DIV_REQ, U_DIV_WAIT, U_DONE
  } upd_state_e;

  upd_state_e  state;
  logic [1:0]  il;         // hypothesis being processed
  logic [5:0]  n_idx;      // sample index within a 61-sample return
  q16_t        ss, bb;
  q16_t        lik  [N_HYP];
  q16_t        lmax;
  q16_t        pdf  [N_HYP];
  q16_t        num  [N_HYP];
  q16_t        den;

  // FIR unit.
  logic fir_en, fir_done;
  q16_t s_re [N_CONV];
  q16_t s_im [N_CONV];

  fir_filter u_fir (
    .clk          (clk),
    .reset_n      (reset_n),
    .fir_en       (fir_en),
    .sel          (il),
    .x            (x),
    .x_j          (x_j),
    .y            (s_re),
    .y_j          (s_im),
    .fir_complete (fir_done)
  );

  // Exponential unit.
  logic exp_en, exp_done;
  q16_t exp_arg, exp_res;
  assign exp_arg = qmul(lik[il] - lmax, inv_noise_var);

  exponential u_exp (
    .clk                  (clk),
    .reset_n              (reset_n),
    .exponential_en       (exp_en),
    .exponential_input    (exp_arg),
    .exponential_result   (exp_res),
    .exponential_complete (exp_done)
  );

  // Divider.
  logic div_en, div_done;
  q16_t div_q;

  division u_div (
    .clk               (clk),
    .reset_n           (reset_n),
    .division_en       (div_en),
    .dividend          (num[il]),
    .divisor           (den),
    .quotient          (div_q),
    .division_complete (div_done)
  );

  q16_t lik_max;
  always_comb begin
    lik_max = lik[0];
    for (int i = 1; i < N_HYP; i++)
      if (lik[i] > lik_max) lik_max = lik[i];
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state           <= U_IDLE;
      il              <= '0;
      n_idx           <= '0;
      ss              <= '0;
      bb              <= '0;
      lmax            <= '0;
      den             <= '0;
      fir_en          <= 1'b0;
      exp_en          <= 1'b0;
      div_en          <= 1'b0;
      update_complete <= 1'b0;
      for (int i = 0; i < N_HYP; i++) begin
        lik[i]        <= '0;
        pdf[i]        <= '0;
        num[i]        <= '0;
        ptheta_out[i] <= '0;
      end
    end else begin
      unique case (state)
        U_IDLE: begin
          if (update_en) begin
            il    <= '0;
            state <= U_FIR_REQ;
          end
        end
        // S = x * h_il
        U_FIR_REQ: begin
          fir_en <= 1'b1;
          state  <= U_FIR_WAIT;
        end
        U_FIR_WAIT: begin
          if (fir_done) begin
            n_idx <= '0;
            ss    <= '0;
            state <= U_SS;
          end
        end
        // SS = re(S^H S)
        U_SS: begin
          ss    <= ss + qmul(s_re[n_idx], s_re[n_idx]) + qmul(s_im[n_idx], s_im[n_idx]);
          n_idx <= n_idx + 6'd1;
          if (n_idx == 6'(N_CONV - 1)) begin
            n_idx <= '0;
            bb    <= '0;
            state <= U_B;
          end
        end
        // b = 2 re(S^H y)
        U_B: begin
          bb    <= bb + qmul(s_re[n_idx], yy[n_idx]) + qmul(s_im[n_idx], yy_j[n_idx]);
          n_idx <= n_idx + 6'd1;
          if (n_idx == 6'(N_CONV - 1)) state <= U_L;
        end
        // L = b - SS; next hypothesis
        U_L: begin
          lik[il] <= (bb <<< 1) - ss;
          fir_en  <= 1'b0;
          il      <= il + 2'd1;
          state   <= (il == 2'(N_HYP - 1)) ? U_MAX : U_FIR_REQ;
        end
        U_MAX: begin
          lmax  <= lik_max;
          il    <= '0;
          state <= U_EXP_REQ;
        end
        // pdf_i = exp((L_i - Lmax) / sigma^2)
        U_EXP_REQ: begin
          exp_en <= 1'b1;
          state  <= U_EXP_WAIT;
        end
        U_EXP_WAIT: begin
          if (exp_done) begin
            pdf[il] <= exp_res;
            exp_en  <= 1'b0;
            il      <= il + 2'd1;
            state   <= (il == 2'(N_HYP - 1)) ? U_NUM : U_EXP_REQ;
          end
        end
        U_NUM: begin
          for (int i = 0; i < N_HYP; i++) num[i] <= qmul(pdf[i], ptheta_in[i]);
          den <= qmul(pdf[0], ptheta_in[0]) + qmul(pdf[1], ptheta_in[1])
               + qmul(pdf[2], ptheta_in[2]) + qmul(pdf[3], ptheta_in[3]);
          il    <= '0;
          state <= U_DIV_REQ;
        end
        // ptheta_i = num_i / sum(num)
        U_DIV_REQ: begin
          if (den == '0) begin
            ptheta_out      <= ptheta_in;
            update_complete <= 1'b1;
            state           <= U_DONE;
          end else begin
            div_en <= 1'b1;
            state  <= U_DIV_WAIT;
          end
        end
        U_DIV_WAIT: begin
          if (div_done && div_en) begin
            ptheta_out[il] <= div_q;
            div_en         <= 1'b0;
            il             <= il + 2'd1;
            if (il == 2'(N_HYP - 1)) begin
              update_complete <= 1'b1;
              state           <= U_DONE;
            end else begin
              state <= U_DIV_REQ;
            end
          end
        end
        U_DONE: begin
          if (!update_en) begin
            update_complete <= 1'b0;
            state           <= U_IDLE;
          end
        end
        default: state <= U_IDLE;
      endcase
    end
  end

endmodule
