// tb_target_recognition: self-checking testbench for the Monte Carlo model,
// run with 10 trials per level (the full 1000 would take hours of simulation)
// over the three highest energy levels, 12 to 14 (+4.3, +7.1 and +10 dB).
//
// At every trial_done the testbench records the true target and the decision
// and checks that the decision is the most probable hypothesis and that the
// four probabilities sum to one within 0.003. At every level_done it checks
// the level number, the trial count, the error count against its own tally
// and pc against (trials - errors) / trials worked out here, to 1 LSB. At
// the two highest energies the recognition must be reliable: at most one
// error in ten trials per level. It also checks that mc_done rises after the last level
// and that the run visits more than one true target. Watchdog: 200 ms.
module tb_target_recognition;
  import crr_pkg::*;
  localparam int TRIALS = 10;
  logic clk = 0, reset_n = 0;
  q16_t ks_start;
  logic [3:0] ks;
  q16_t kms, err_count, pc;
  logic [1:0] target_sel, decision;
  q16_t ptheta [N_HYP];
  logic trial_done, level_done, mc_done;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  target_recognition #(.N_TRIALS(TRIALS)) dut (
    .clk(clk), .reset_n(reset_n), .ks_start(ks_start), .ks(ks), .kms(kms), .target_sel(target_sel),
    .decision(decision), .err_count(err_count), .pc(pc), .ptheta(ptheta), .trial_done(trial_done),
    .level_done(level_done), .mc_done(mc_done));

  always #4 clk = ~clk;
  initial begin #200ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  int trials = 0, errs = 0, levels = 0, seen_tgt [4] = '{0, 0, 0, 0};
  int expect_level = 12;
  always @(negedge clk) if (reset_n) begin
    if (trial_done) begin
      real sum;
      int best;
      trials++;
      seen_tgt[target_sel]++;
      if (decision != target_sel) errs++;
      sum = 0.0; best = 0;
      for (int i = 0; i < N_HYP; i++) begin
        sum += real'(ptheta[i]) / 65536.0;
        if (ptheta[i] > ptheta[best]) best = i;
      end
      $display("level %0d trial %0d target %0d decision %0d P = %f %f %f %f", ks, kms, target_sel, decision,
               real'(ptheta[0]) / 65536.0, real'(ptheta[1]) / 65536.0, real'(ptheta[2]) / 65536.0, real'(ptheta[3]) / 65536.0);
      checks += 2;
      if (decision != 2'(best)) begin failures++; $display("FAIL decision is not the most probable"); end
      if (fabs(sum - 1.0) > 0.003) begin failures++; $display("FAIL probabilities sum %f", sum); end
    end
    if (level_done) begin
      longint want_pc;
      levels++;
      want_pc = (longint'(TRIALS - errs) * 65536) / TRIALS;
      $display("level %0d done: errors %0d pc %f", ks, err_count, real'(pc) / 65536.0);
      checks += 5;
      if (ks != 4'(expect_level)) begin failures++; $display("FAIL level %0d want %0d", ks, expect_level); end
      if (trials != TRIALS) begin failures++; $display("FAIL trials %0d", trials); end
      if (err_count != errs) begin failures++; $display("FAIL err_count %0d want %0d", err_count, errs); end
      if (longint'(pc) - want_pc > 1 || want_pc - longint'(pc) > 1) begin failures++; $display("FAIL pc %0d want %0d", pc, want_pc); end
      if (ks >= 13 && errs > 1) begin failures++; $display("FAIL too many errors at a high energy level"); end
      trials = 0; errs = 0; expect_level++;
    end
  end

  initial begin
    ks_start = 32'sd12;
    repeat (3) @(posedge clk);
    reset_n = 1;
    wait (mc_done);
    repeat (3) @(posedge clk);
    checks += 2;
    if (levels != 3) begin failures++; $display("FAIL levels %0d", levels); end
    if ((seen_tgt[0] != 0) + (seen_tgt[1] != 0) + (seen_tgt[2] != 0) + (seen_tgt[3] != 0) < 2) begin
      failures++; $display("FAIL only one target drawn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
