// tb_mc_pcc: workload testbench for the Monte Carlo model. It checks the
// classification rate at the upper energy levels rather than the mechanics.
//
// The model runs with 20 trials per level at levels 9 to 14 (-4.3 dB to
// +10 dB), 120 trials in all. A full run of 1000 trials per level is far too
// long to simulate. The original reports a probability of correct
// classification between about 0.96 and 1 over these levels. With 20 trials
// a level, this testbench asks for:
//   * at most 3 errors in each level (pc >= 0.85);
//   * at most 12 errors in all (pc >= 0.90);
//   * pc non-decreasing in energy, up to two errors of sampling slack;
//   * at most one error in each of the two highest levels.
// At every level_done it also checks pc against (20 - errors) / 20 to 1 LSB,
// and checks err_count against its own tally of decision != true target.
// The watchdog is 1 s of simulated time. Interface: it drives only clk,
// reset_n and ks_start of target_recognition.
module tb_mc_pcc;
  import crr_pkg::*;
  localparam int TRIALS = 20;
  localparam int FIRST  = 9;
  logic clk = 0, reset_n = 0;
  q16_t ks_start;
  logic [3:0] ks;
  q16_t kms, err_count, pc;
  logic [1:0] target_sel, decision;
  q16_t ptheta [N_HYP];
  logic trial_done, level_done, mc_done;
  int checks = 0, failures = 0;

  target_recognition #(.N_TRIALS(TRIALS)) dut (
    .clk(clk), .reset_n(reset_n), .ks_start(ks_start), .ks(ks), .kms(kms), .target_sel(target_sel),
    .decision(decision), .err_count(err_count), .pc(pc), .ptheta(ptheta), .trial_done(trial_done),
    .level_done(level_done), .mc_done(mc_done));

  always #4 clk = ~clk;
  initial begin #1s; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  int errs = 0, total_errs = 0, levels = 0, prev_errs = 0;
  int expect_level = FIRST;
  always @(negedge clk) if (reset_n) begin
    if (trial_done && decision != target_sel) errs++;
    if (level_done) begin
      longint want_pc;
      want_pc = (longint'(TRIALS - errs) * 65536) / TRIALS;
      $display("level %0d: errors %0d of %0d, pc %f", ks, errs, TRIALS, real'(pc) / 65536.0);
      checks += 4;
      if (ks != 4'(expect_level)) begin failures++; $display("FAIL level %0d want %0d", ks, expect_level); end
      if (err_count != errs) begin failures++; $display("FAIL err_count %0d want %0d", err_count, errs); end
      if (longint'(pc) - want_pc > 1 || want_pc - longint'(pc) > 1) begin failures++; $display("FAIL pc %0d want %0d", pc, want_pc); end
      if (errs > 3) begin failures++; $display("FAIL pc below 0.85 at level %0d", ks); end
      if (levels > 0) begin
        checks++;
        if (errs > prev_errs + 2) begin failures++; $display("FAIL pc falls with energy at level %0d", ks); end
      end
      if (ks >= 13) begin
        checks++;
        if (errs > 1) begin failures++; $display("FAIL more than one error at level %0d", ks); end
      end
      total_errs += errs;
      prev_errs = errs; errs = 0; levels++; expect_level++;
    end
  end

  initial begin
    ks_start = q16_t'(FIRST);
    repeat (3) @(posedge clk);
    reset_n = 1;
    wait (mc_done);
    repeat (3) @(posedge clk);
    checks += 2;
    if (levels != 15 - FIRST) begin failures++; $display("FAIL levels %0d", levels); end
    $display("levels %0d..14: %0d errors in %0d trials, pc %f", FIRST, total_errs, levels * TRIALS,
             1.0 - real'(total_errs) / real'(levels * TRIALS));
    if (total_errs > 12) begin failures++; $display("FAIL overall pc below 0.90"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
