// tb_random_number_generator: self-checking testbench for the random sources.
//
// A model written here steps the 3-bit target-select register and the twenty
// 19-bit LFSRs (same taps and seeds) and predicts random, noise and noise_j
// every clock for 3000 clocks after reset; all three must match exactly.
// Then over 60000 clocks it checks the statistics of the noise: mean within
// 0.02 of zero, standard deviation between 0.45 and 0.60 (about 0.52
// expected), correlation of the two channels below 0.05, and that the target
// selection takes each of the four values exactly a quarter of the time (the
// 4-state cycle of the 3-bit register from its seed). Watchdog: 5 ms.
module tb_random_number_generator;
  import crr_pkg::*;
  logic clk = 0, reset_n = 0;
  logic [1:0] random;
  q16_t noise, noise_j;
  int checks = 0, failures = 0;

  random_number_generator dut (.clk(clk), .reset_n(reset_n), .random(random), .noise(noise), .noise_j(noise_j));

  always #4 clk = ~clk;
  initial begin #5ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [2:0]  m3;
  logic [18:0] mi [10], mq [10];

  function automatic q16_t model_noise(logic [18:0] w [10]);
    longint s;
    s = 0;
    foreach (w[i]) s += longint'(w[i]);
    return q16_t'(((s * 4634) >>> 16) - 185364);
  endfunction

  initial begin
    logic [2:0] n3;
    logic [1:0] exp_r;
    q16_t exp_i, exp_q;
    int bad_r, bad_i, bad_q, seen [4];
    real sum_i, sum_q, sq_i, sq_q, sum_iq, mean_i, mean_q, sd_i, sd_q, corr;
    int n;
    repeat (3) @(posedge clk);
    m3 = 3'b100;
    for (int i = 0; i < 10; i++) begin
      mi[i] = 19'h2B4C1 ^ 19'((i + 1) * 40503);
      mq[i] = 19'h51A37 ^ 19'((i + 1) * 40503);
    end
    @(negedge clk) reset_n = 1;
    bad_r = 0; bad_i = 0; bad_q = 0;
    for (int c = 0; c < 3000; c++) begin
      // register outputs after this edge are computed from the state before it
      n3 = {m3[2], m3[2] ^ m3[0], m3[1]};
      exp_r = {n3[1], n3[2] ^ n3[0]};
      exp_i = model_noise(mi);
      exp_q = model_noise(mq);
      m3 = n3;
      for (int i = 0; i < 10; i++) begin
        mi[i] = {mi[i][17:0], mi[i][18] ^ mi[i][16]};
        mq[i] = {mq[i][17:0], mq[i][18] ^ mq[i][16]};
      end
      @(posedge clk); #1;
      if (random != exp_r) bad_r++;
      if (noise != exp_i) bad_i++;
      if (noise_j != exp_q) bad_q++;
    end
    checks += 3;
    if (bad_r) begin failures++; $display("FAIL random mismatches %0d", bad_r); end
    if (bad_i) begin failures++; $display("FAIL noise mismatches %0d", bad_i); end
    if (bad_q) begin failures++; $display("FAIL noise_j mismatches %0d", bad_q); end
    sum_i = 0; sum_q = 0; sq_i = 0; sq_q = 0; sum_iq = 0;
    seen = '{0, 0, 0, 0};
    n = 60000;
    for (int c = 0; c < n; c++) begin
      @(posedge clk); #1;
      sum_i += real'(noise) / 65536.0;
      sum_q += real'(noise_j) / 65536.0;
      sq_i  += (real'(noise) / 65536.0) ** 2;
      sq_q  += (real'(noise_j) / 65536.0) ** 2;
      sum_iq += real'(noise) / 65536.0 * real'(noise_j) / 65536.0;
      seen[random]++;
    end
    mean_i = sum_i / n; mean_q = sum_q / n;
    sd_i = $sqrt(sq_i / n - mean_i * mean_i);
    sd_q = $sqrt(sq_q / n - mean_q * mean_q);
    corr = (sum_iq / n - mean_i * mean_q) / (sd_i * sd_q);
    $display("noise mean %f %f  std %f %f  corr %f  random counts %0d %0d %0d %0d",
             mean_i, mean_q, sd_i, sd_q, corr, seen[0], seen[1], seen[2], seen[3]);
    checks += 5;
    if (mean_i > 0.02 || mean_i < -0.02 || mean_q > 0.02 || mean_q < -0.02) begin failures++; $display("FAIL mean"); end
    if (sd_i < 0.45 || sd_i > 0.60) begin failures++; $display("FAIL std I"); end
    if (sd_q < 0.45 || sd_q > 0.60) begin failures++; $display("FAIL std Q"); end
    if (corr > 0.05 || corr < -0.05) begin failures++; $display("FAIL correlation"); end
    if (seen[0] != n / 4 || seen[1] != n / 4 || seen[2] != n / 4 || seen[3] != n / 4) begin failures++; $display("FAIL target values"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
