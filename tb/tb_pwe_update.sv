// tb_pwe_update: self-checking testbench for the Bayesian probability update.
//
// A transmit waveform x (an eigenwaveform, or a random waveform, scaled to
// amplitudes from small to large) is convolved here, in real arithmetic, with
// a chosen target response to form the return y, with optional uniform
// noise. The expected posteriors are computed here independently: S_i = x*h_i,
// L_i = 2 re(S_i^H y) - S_i^H S_i, p_i = exp of (L_i - max L) * inv_noise_var
// rounded to 1/64 and limited to the exponential's range, P_i' = p_i P_i /
// sum. Checked: each posterior within 0.02, their sum within 0.002 of one,
// the chosen target most probable when the return is strong and noise-free,
// the priors kept when every product underflows, and the run length between
// 4*62 and 1300 clocks. Watchdog: 20 ms.
module tb_pwe_update;
  import crr_pkg::*;
  import crr_tables_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  q16_t x [N_TAPS], xj [N_TAPS];
  q16_t y [N_CONV], yj [N_CONV];
  q16_t pin [N_HYP], pout [N_HYP];
  logic done;
  int checks = 0, failures = 0;
  localparam q16_t INV_NV = 32'sd122880;   // 1.875
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  pwe_update dut (.clk(clk), .reset_n(reset_n), .update_en(en), .x(x), .x_j(xj), .yy(y), .yy_j(yj),
                  .ptheta_in(pin), .inv_noise_var(INV_NV), .ptheta_out(pout), .update_complete(done));

  always #4 clk = ~clk;
  initial begin #20ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // Real convolution of the current x with response t.
  task automatic conv(int t, output real sr [N_CONV], output real si [N_CONV]);
    for (int n = 0; n < N_CONV; n++) begin
      sr[n] = 0.0; si[n] = 0.0;
      for (int k = 0; k < N_TAPS; k++)
        if (n - k >= 0 && n - k < N_TAPS) begin
          sr[n] += real'(x[n-k]) / 65536.0 * H_RE_TAB[t][k] - real'(xj[n-k]) / 65536.0 * H_IM_TAB[t][k];
          si[n] += real'(x[n-k]) / 65536.0 * H_IM_TAB[t][k] + real'(xj[n-k]) / 65536.0 * H_RE_TAB[t][k];
        end
    end
  endtask

  // Build x = amp * se_w (w < 4) or random, y = x*h_tgt + noise, then check.
  task automatic run(int w, int tgt, real amp, real noise, real pr [N_HYP], bit expect_peak);
    real sr [N_CONV], si [N_CONV];
    real lik [N_HYP], pdf [N_HYP], post [N_HYP];
    real lmax, den, a, sum;
    bit  keep;
    int  lat;
    for (int n = 0; n < N_TAPS; n++) begin
      if (w < N_HYP) begin
        x[n]  = to_q(amp * SE_RE_TAB[w][n]);
        xj[n] = to_q(amp * SE_IM_TAB[w][n]);
      end else begin
        x[n]  = to_q(amp * (real'($urandom_range(2000)) / 1000.0 - 1.0) / 4.0);
        xj[n] = to_q(amp * (real'($urandom_range(2000)) / 1000.0 - 1.0) / 4.0);
      end
    end
    conv(tgt, sr, si);
    for (int n = 0; n < N_CONV; n++) begin
      y[n]  = to_q(sr[n] + noise * (real'($urandom_range(2000)) / 1000.0 - 1.0));
      yj[n] = to_q(si[n] + noise * (real'($urandom_range(2000)) / 1000.0 - 1.0));
    end
    foreach (pin[i]) pin[i] = to_q(pr[i]);
    // reference
    for (int i = 0; i < N_HYP; i++) begin
      conv(i, sr, si);
      lik[i] = 0.0;
      for (int n = 0; n < N_CONV; n++)
        lik[i] += 2.0 * (sr[n] * real'(y[n]) + si[n] * real'(yj[n])) / 65536.0 - sr[n] * sr[n] - si[n] * si[n];
    end
    lmax = lik[0];
    foreach (lik[i]) if (lik[i] > lmax) lmax = lik[i];
    den = 0.0;
    keep = 1;
    for (int i = 0; i < N_HYP; i++) begin
      a = $floor((lik[i] - lmax) * 1.875 * 64.0 + 0.5);
      if (a < -709.0) a = -709.0;
      pdf[i] = $exp(a / 64.0);
      den += pdf[i] * pr[i];
      if (pr[i] > 0.0 && a > -700.0) keep = 0;
    end
    foreach (post[i]) post[i] = keep ? pr[i] : pdf[i] * pr[i] / den;
    @(negedge clk); en = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 5000);
    checks++;
    if (lat < 4 * 62 || lat > 1300) begin failures++; $display("FAIL run length %0d", lat); end
    sum = 0.0;
    for (int i = 0; i < N_HYP; i++) begin
      checks++;
      sum += real'(pout[i]) / 65536.0;
      if (fabs(real'(pout[i]) / 65536.0 - post[i]) > 0.02) begin
        failures++; $display("FAIL w%0d t%0d amp %f P%0d = %f want %f", w, tgt, amp, i, real'(pout[i]) / 65536.0, post[i]);
      end
    end
    checks++;
    if (fabs(sum - 1.0) > 0.002) begin failures++; $display("FAIL sum %f", sum); end
    if (expect_peak) begin
      checks++;
      for (int i = 0; i < N_HYP; i++)
        if (i != tgt && pout[i] >= pout[tgt]) begin failures++; $display("FAIL target %0d not most probable", tgt); break; end
    end
    if (keep) begin
      checks++;
      foreach (pin[i]) if (pout[i] != pin[i]) begin failures++; $display("FAIL priors not kept"); break; end
    end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    real pr [N_HYP], sum;
    foreach (x[n]) begin x[n] = 0; xj[n] = 0; end
    foreach (y[n]) begin y[n] = 0; yj[n] = 0; end
    foreach (pin[i]) pin[i] = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    pr = '{0.25, 0.25, 0.25, 0.25};
    for (int t = 0; t < N_HYP; t++) run(t, t, 2.0, 0.0, pr, 1);      // strong, noise-free
    for (int t = 0; t < N_HYP; t++) run(4, t, 0.3, 0.0, pr, 0);      // weak: soft posteriors
    for (int t = 0; t < N_HYP; t++) run(t, (t + 1) % 4, 0.5, 0.05, pr, 0);
    pr = '{0.0, 0.3, 0.3, 0.4};
    run(0, 0, 4.0, 0.0, pr, 0);                                      // everything underflows
    repeat (8) begin
      sum = 0.0;
      foreach (pr[i]) begin pr[i] = real'($urandom_range(100)) + 1.0; sum += pr[i]; end
      foreach (pr[i]) pr[i] /= sum;
      run($urandom_range(4), $urandom_range(3), real'($urandom_range(100)) / 100.0 + 0.1, 0.02, pr, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
