// tb_xpwe: self-checking testbench for the PWE transmit waveform generator.
//
// Two instances are driven with the same probabilities: the default one
// (energy normalization on) and one with NORMALIZE = 0, as used by the
// hardware processor. For each probability set (equal, skewed, one-hot and
// random sets summing to one) and a transmit amplitude sqrt(Es) taken from
// the energy table, the waveform is computed here in real arithmetic from the
// eigenwaveform tables: x_pwe = sum sqrt(P_i) se_i, x = sqrt(Es) x_pwe /
// sqrt(E_pwe). Checked: every sample of both instances within tolerance, the
// normalized waveform's energy equal to Es within 1%, and the latency of the
// default instance between 65536*sqrt(max P) and that plus
// 65536*sqrt(E_pwe) + 400 clocks. Watchdog: 50 ms.
module tb_xpwe;
  import crr_pkg::*;
  import crr_tables_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  q16_t p [N_HYP];
  q16_t es;
  q16_t s [N_TAPS], sj [N_TAPS], s0 [N_TAPS], s0j [N_TAPS];
  logic done, done0;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  xpwe dut (.clk(clk), .reset_n(reset_n), .xpwe_en(en), .ptheta(p), .squareroot_Es_input(es),
            .s(s), .s_j(sj), .xpwe_complete(done));
  xpwe #(.NORMALIZE(1'b0)) dut_raw (.clk(clk), .reset_n(reset_n), .xpwe_en(en), .ptheta(p),
            .squareroot_Es_input(es), .s(s0), .s_j(s0j), .xpwe_complete(done0));

  always #4 clk = ~clk;
  initial begin #50ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic run(real pr [N_HYP], int ks);
    real xr [N_TAPS], xi [N_TAPS];
    real e, amp, pmax, got_e, tol_raw, tol;
    int lat, lo, hi;
    pmax = 0.0;
    for (int i = 0; i < N_HYP; i++) begin
      p[i] = to_q(pr[i]);
      if (pr[i] > pmax) pmax = pr[i];
    end
    es = SQRT_EX_TAB[ks];
    amp = real'(es) / 65536.0;
    e = 0.0;
    for (int n = 0; n < N_TAPS; n++) begin
      xr[n] = 0.0; xi[n] = 0.0;
      for (int i = 0; i < N_HYP; i++) begin
        xr[n] += $sqrt(pr[i]) * SE_RE_TAB[i][n];
        xi[n] += $sqrt(pr[i]) * SE_IM_TAB[i][n];
      end
      e += xr[n] * xr[n] + xi[n] * xi[n];
    end
    @(negedge clk); en = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!(done && done0) && lat < 2000000);
    lo = int'(65536.0 * $sqrt(pmax));
    hi = lo + int'(65536.0 * $sqrt(e)) + 400;
    checks++;
    if (lat < lo || lat > hi) begin failures++; $display("FAIL latency %0d not in %0d..%0d", lat, lo, hi); end
    got_e = 0.0;
    tol_raw = 0.0005;
    tol = 0.002 * amp + 0.0005;
    for (int n = 0; n < N_TAPS; n++) begin
      checks += 4;
      if (fabs(real'(s0[n]) / 65536.0 - xr[n]) > tol_raw) begin failures++; $display("FAIL raw re[%0d] %f want %f", n, real'(s0[n]) / 65536.0, xr[n]); end
      if (fabs(real'(s0j[n]) / 65536.0 - xi[n]) > tol_raw) begin failures++; $display("FAIL raw im[%0d]", n); end
      if (fabs(real'(s[n]) / 65536.0 - amp * xr[n] / $sqrt(e)) > tol) begin failures++; $display("FAIL re[%0d] %f want %f", n, real'(s[n]) / 65536.0, amp * xr[n] / $sqrt(e)); end
      if (fabs(real'(sj[n]) / 65536.0 - amp * xi[n] / $sqrt(e)) > tol) begin failures++; $display("FAIL im[%0d]", n); end
      got_e += (real'(s[n]) / 65536.0) ** 2 + (real'(sj[n]) / 65536.0) ** 2;
    end
    checks++;
    if (fabs(got_e / (amp * amp) - 1.0) > 0.01) begin failures++; $display("FAIL energy %f want %f", got_e, amp * amp); end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (done || done0) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    real pr [N_HYP];
    real sum;
    foreach (p[i]) p[i] = 0;
    es = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    pr = '{0.25, 0.25, 0.25, 0.25};  run(pr, 10);
    pr = '{0.85, 0.05, 0.05, 0.05};  run(pr, 14);
    pr = '{0.0, 0.0, 1.0, 0.0};      run(pr, 7);
    pr = '{0.1, 0.2, 0.3, 0.4};      run(pr, 12);
    repeat (3) begin
      sum = 0.0;
      foreach (pr[i]) begin pr[i] = real'($urandom_range(1000)) + 1.0; sum += pr[i]; end
      foreach (pr[i]) pr[i] /= sum;
      run(pr, $urandom_range(14));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
