// target_recognition: Monte Carlo evaluation of PWE cognitive-radar target
// recognition, entirely in logic.
//
// For each transmit energy level ks (Ex = -30 dB + ks*40/14 dB, amplitude
// sqrt(Ex) from a table) the unit runs N_TRIALS trials. A trial draws a random
// true target, then N_ITER times: convolves the current transmit waveform x
// with the true target's response, adds pseudo-Gaussian noise (61 complex
// samples, one noise sample per clock) to form the return y, updates the four
// hypothesis probabilities from y (pwe_update) and regenerates x from them
// (xpwe). After the last iteration the most probable hypothesis is the
// decision; a wrong decision counts an error. At the end of a level the
// probability of correct classification pc = (N_TRIALS - err) / N_TRIALS is
// formed on a divider. The first waveform of every trial uses equal
// probabilities 1/4 and is computed once per level.
//
// The 22-step sequence (initialise, level loop, first waveform, trial loop,
// target return, noise, likelihoods, probability update, new waveform,
// classification, error count, pc, level increment, end) and the sizes -
// 15 levels, 1000 trials, 4 iterations - are the document's. That the level
// loop starts at ks_start, the tie rule of the decision (lowest index wins),
// the use of a second FIR unit for the target return and of separate
// dividers for pc and for the probability update, and INV_NOISE_VAR (the
// reciprocal of the complex noise variance, 1/(2*0.2667)) are this design's.
//
// Timing: a trial takes roughly N_ITER * (xpwe + ~1200) clocks, where one
// xpwe run costs about 65536*(sqrt(max ptheta) + sqrt(E_pwe)) clocks because
// of the linear-search square root. level_done pulses for one clock when pc
// and err_count of a level are valid; mc_done rises at the end and stays.
module target_recognition
  import crr_pkg::*;
  import crr_tables_pkg::*;
#(
  parameter int   N_LEVELS      = 15,
  parameter int   N_TRIALS      = 1000,
  parameter int   N_ITER        = 4,
  parameter q16_t INV_NOISE_VAR = 32'sd122880   // 1.875
) (
  input  logic       clk,
  input  logic       reset_n,
  input  q16_t       ks_start,        // first energy level, 0..N_LEVELS-1
  output logic [3:0] ks,              // current energy level
  output q16_t       kms,             // current trial
  output logic [1:0] target_sel,      // true target of the current trial
  output logic [1:0] decision,        // last classification
  output q16_t       err_count,       // wrong decisions at this level
  output q16_t       pc,              // probability of correct classification
  output q16_t       ptheta [N_HYP],  // current hypothesis probabilities
  output logic       trial_done,      // one-clock pulse per trial
  output logic       level_done,      // one-clock pulse per level
  output logic       mc_done
);

  typedef enum logic [4:0] {
    S_INIT, S_LEVEL, S_XPWE0, S_READ_XPWE0, S_TRIAL, S_FIR_TGT, S_READ_FIR,
    S_NOISE, S_UPDATE, S_READ_UPDATE, S_XPWE, S_READ_XPWE, S_CLASSIFY,
    S_NEXT_TRIAL, S_PCC, S_READ_PCC, S_NEXT_LEVEL, S_END
  } mc_state_e;

  mc_state_e  state;
  logic [2:0] iter;
  logic [5:0] n_idx;
  q16_t       sqrt_es;
  q16_t       x_init_re [N_TAPS];
  q16_t       x_init_im [N_TAPS];
  q16_t       x_re      [N_TAPS];
  q16_t       x_im      [N_TAPS];
  q16_t       yy        [N_CONV];
  q16_t       yy_j      [N_CONV];

  // Random sources.
  logic [1:0] random;
  q16_t       noise, noise_j;

  random_number_generator u_rng (
    .clk     (clk),
    .reset_n (reset_n),
    .random  (random),
    .noise   (noise),
    .noise_j (noise_j)
  );

  // Transmit waveform generator.
  logic xpwe_en, xpwe_done;
  q16_t xs_re [N_TAPS];
  q16_t xs_im [N_TAPS];

  xpwe #(.NORMALIZE(1'b1)) u_xpwe (
    .clk                 (clk),
    .reset_n             (reset_n),
    .xpwe_en             (xpwe_en),
    .ptheta              (ptheta),
    .squareroot_Es_input (sqrt_es),
    .s                   (xs_re),
    .s_j                 (xs_im),
    .xpwe_complete       (xpwe_done)
  );

  // Target return s_g = x * h_target.
  logic fir_en, fir_done;
  q16_t sg_re [N_CONV];
  q16_t sg_im [N_CONV];

  fir_filter u_fir_target (
    .clk          (clk),
    .reset_n      (reset_n),
    .fir_en       (fir_en),
    .sel          (target_sel),
    .x            (x_re),
    .x_j          (x_im),
    .y            (sg_re),
    .y_j          (sg_im),
    .fir_complete (fir_done)
  );

  // Likelihoods and probability update.
  logic upd_en, upd_done;
  q16_t p_new [N_HYP];

  pwe_update u_update (
    .clk             (clk),
    .reset_n         (reset_n),
    .update_en       (upd_en),
    .x               (x_re),
    .x_j             (x_im),
    .yy              (yy),
    .yy_j            (yy_j),
    .ptheta_in       (ptheta),
    .inv_noise_var   (INV_NOISE_VAR),
    .ptheta_out      (p_new),
    .update_complete (upd_done)
  );

  // pc = (N_TRIALS - err) / N_TRIALS.
  logic div_en, div_done;
  q16_t div_q;

  division u_div_pcc (
    .clk               (clk),
    .reset_n           (reset_n),
    .division_en       (div_en),
    .dividend          (q16_t'((N_TRIALS - err_count) <<< 16)),
    .divisor           (q16_t'(N_TRIALS <<< 16)),
    .quotient          (div_q),
    .division_complete (div_done)
  );

  // MAP decision: index of the largest probability (lowest index on a tie).
  logic [1:0] map_idx;
  always_comb begin
    map_idx = 2'd0;
    for (int i = 1; i < N_HYP; i++)
      if (ptheta[i] > ptheta[map_idx]) map_idx = 2'(i);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state      <= S_INIT;
      ks         <= '0;
      kms        <= '0;
      iter       <= '0;
      n_idx      <= '0;
      target_sel <= '0;
      decision   <= '0;
      err_count  <= '0;
      pc         <= '0;
      sqrt_es    <= '0;
      xpwe_en    <= 1'b0;
      fir_en     <= 1'b0;
      upd_en     <= 1'b0;
      div_en     <= 1'b0;
      trial_done <= 1'b0;
      level_done <= 1'b0;
      mc_done    <= 1'b0;
      for (int i = 0; i < N_HYP; i++) ptheta[i] <= Q_QUARTER;
      for (int n = 0; n < N_TAPS; n++) begin
        x_init_re[n] <= '0;
        x_init_im[n] <= '0;
        x_re[n]      <= '0;
        x_im[n]      <= '0;
      end
      for (int n = 0; n < N_CONV; n++) begin
        yy[n]   <= '0;
        yy_j[n] <= '0;
      end
    end else begin
      trial_done <= 1'b0;
      level_done <= 1'b0;
      unique case (state)
        // 0: read the starting energy level
        S_INIT: begin
          ks    <= (ks_start >= N_LEVELS) ? 4'(N_LEVELS - 1) : 4'(ks_start);
          state <= S_LEVEL;
        end
        // 1: energy level loop, sqrt(Ex) from the table
        S_LEVEL: begin
          sqrt_es   <= SQRT_EX_TAB[ks];
          err_count <= '0;
          kms       <= '0;
          for (int i = 0; i < N_HYP; i++) ptheta[i] <= Q_QUARTER;
          state     <= S_XPWE0;
        end
        // 2-3: first waveform with ptheta = 1/4
        S_XPWE0: begin
          xpwe_en <= 1'b1;
          state   <= S_READ_XPWE0;
        end
        S_READ_XPWE0: begin
          if (xpwe_done) begin
            x_init_re <= xs_re;
            x_init_im <= xs_im;
            xpwe_en   <= 1'b0;
            state     <= S_TRIAL;
          end
        end
        // 4: trial loop, random target
        S_TRIAL: begin
          target_sel <= random;
          x_re       <= x_init_re;
          x_im       <= x_init_im;
          iter       <= '0;
          for (int i = 0; i < N_HYP; i++) ptheta[i] <= Q_QUARTER;
          state      <= S_FIR_TGT;
        end
        // 5-6: iteration loop, s_g = x * h_target
        S_FIR_TGT: begin
          fir_en <= 1'b1;
          state  <= S_READ_FIR;
        end
        S_READ_FIR: begin
          if (fir_done) begin
            n_idx <= '0;
            state <= S_NOISE;
          end
        end
        // 7: y = s_g + w
        S_NOISE: begin
          yy[n_idx]   <= sg_re[n_idx] + noise;
          yy_j[n_idx] <= sg_im[n_idx] + noise_j;
          n_idx       <= n_idx + 6'd1;
          if (n_idx == 6'(N_CONV - 1)) begin
            fir_en <= 1'b0;
            state  <= S_UPDATE;
          end
        end
        // 8-14: likelihoods, pdf values, probability update
        S_UPDATE: begin
          upd_en <= 1'b1;
          state  <= S_READ_UPDATE;
        end
        S_READ_UPDATE: begin
          if (upd_done) begin
            ptheta <= p_new;
            upd_en <= 1'b0;
            state  <= S_XPWE;
          end
        end
        // 15-16: new waveform, next iteration
        S_XPWE: begin
          xpwe_en <= 1'b1;
          state   <= S_READ_XPWE;
        end
        S_READ_XPWE: begin
          if (xpwe_done) begin
            x_re    <= xs_re;
            x_im    <= xs_im;
            xpwe_en <= 1'b0;
            iter    <= iter + 3'd1;
            state   <= (iter == 3'(N_ITER - 1)) ? S_CLASSIFY : S_FIR_TGT;
          end
        end
        // 17: MAP decision, error count
        S_CLASSIFY: begin
          decision <= map_idx;
          if (map_idx != target_sel) err_count <= err_count + 32'sd1;
          trial_done <= 1'b1;
          state      <= S_NEXT_TRIAL;
        end
        // 18: next trial
        S_NEXT_TRIAL: begin
          if (kms == q16_t'(N_TRIALS - 1)) begin
            state <= S_PCC;
          end else begin
            kms   <= kms + 32'sd1;
            state <= S_TRIAL;
          end
        end
        // 19: pc of this level
        S_PCC: begin
          div_en <= 1'b1;
          state  <= S_READ_PCC;
        end
        S_READ_PCC: begin
          if (div_done && div_en) begin
            pc         <= div_q;
            div_en     <= 1'b0;
            level_done <= 1'b1;
            state      <= S_NEXT_LEVEL;
          end
        end
        // 20: next energy level
        S_NEXT_LEVEL: begin
          if (ks == 4'(N_LEVELS - 1)) begin
            state <= S_END;
          end else begin
            ks    <= ks + 4'd1;
            state <= S_LEVEL;
          end
        end
        // 21: end of the run
        S_END: begin
          mc_done <= 1'b1;
        end
        default: state <= S_INIT;
      endcase
    end
  end

endmodule
