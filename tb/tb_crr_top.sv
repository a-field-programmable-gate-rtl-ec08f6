// tb_crr_top: end-to-end testbench of the top level. The Monte Carlo model
// runs with 3 trials per level so that whole levels finish; everything else
// keeps its default (10 ms debounce, 244 kHz SPI, 100 ms retransmission).
//
// The radar processor is closed through the behavioural RF loop model and
// runs two recognitions (targets 1 and 3, the second with noisy returns)
// with a periodic retransmission in between. At the same time the Monte Carlo
// model runs from energy level 13 to the last level (14). An SPI receiver
// model here rebuilds the processor's read-out words.
//
// Every mechanism is counted and one that never happened counts a failure:
// reset state, debounced start, transmit bursts with reference pulses,
// detected returns and read windows, probability updates reported on SPI,
// decision LEDs, status word, retransmission in idle, Monte Carlo trials,
// levels, pc and end of run. Values are checked against what is worked out
// here: 4 bursts and 4 returns per recognition; 21 SPI words per
// recognition with every frame of probabilities summing to one within 0.003
// and the status word holding decision and DIP setting; the lit LED equal to
// the true target; sck period 512 clocks; start STABLE..STABLE+10 clocks
// after the button settles; each Monte Carlo decision equal to the most
// probable hypothesis; err_count equal to the testbench's own tally and pc
// equal to (trials - errors) / trials to 1 LSB. Watchdog: 400 ms.
module tb_crr_top;
  import crr_pkg::*;
  localparam int MC_TRIALS = 3;
  localparam bit FULL_SIZE = 1'b0;
  localparam int STABLE = 1_250_000;
  localparam int RETX   = 12_500_000;
  logic clk = 0;
  logic [3:0] dip = 0;
  logic button = 0, reset = 1, mc_reset_n = 0;
  logic [239:0] rx_data, tx_data;
  logic [7:0] pmod0;
  logic [3:0] pmod1;
  q16_t mc_ks_start = 32'sd13;
  logic [3:0] mc_ks;
  q16_t mc_kms, mc_err, mc_pc;
  logic [1:0] mc_tgt, mc_dec;
  q16_t mc_p [N_HYP];
  logic mc_trial_done, mc_level_done, mc_done;
  logic [1:0] target = 1;
  real noise_amp = 0.0;
  int bursts, returns;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  crr_top #(.MC_N_TRIALS(MC_TRIALS)) dut (
    .clk(clk), .GPIO_DIP_SW1(dip[0]), .GPIO_DIP_SW2(dip[1]), .GPIO_DIP_SW3(dip[2]), .GPIO_DIP_SW4(dip[3]),
    .GPIO_SW_C(button), .RESET(reset), .RX_DATA(rx_data), .TX_XPWE(tx_data), .PMOD0(pmod0), .PMOD1(pmod1),
    .mc_reset_n(mc_reset_n), .mc_ks_start(mc_ks_start), .mc_ks(mc_ks), .mc_kms(mc_kms),
    .mc_target_sel(mc_tgt), .mc_decision(mc_dec), .mc_err_count(mc_err), .mc_pc(mc_pc),
    .mc_ptheta(mc_p), .mc_trial_done(mc_trial_done), .mc_level_done(mc_level_done), .mc_done(mc_done));

  rf_loop_model u_rf (.clk(clk), .tx_data(tx_data), .target(target), .noise_amp(noise_amp),
                      .rx_data(rx_data), .bursts(bursts), .returns(returns));

  always #4ns clk = ~clk;
  initial begin #400ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // Processor monitors.
  logic [31:0] spi_words [$];
  logic [31:0] shreg;
  int nbits = 0, cyc = 0, last_rise = 0, bad_period = 0;
  int n_start = 0, n_ref = 0, n_hits = 0, n_read = 0, n_retx = 0, n_led = 0, n_status = 0, n_updates = 0;
  logic sck_d = 0, ss_d = 1, busy_d = 0;
  always @(posedge clk) if (!reset) begin
    cyc++;
    if (pmod0[0] && !sck_d && !pmod0[2]) begin
      shreg = {shreg[30:0], pmod0[1]};
      nbits++;
      if (nbits > 1 && cyc - last_rise != 512) bad_period++;
      last_rise = cyc;
    end
    if (pmod0[2] && !ss_d) begin
      if (nbits == 32) spi_words.push_back(shreg);
      else begin failures++; $display("FAIL SPI frame of %0d bits", nbits); end
      nbits = 0;
    end
    if (pmod0[3] && !busy_d) n_start++;
    sck_d  <= pmod0[0];
    ss_d   <= pmod0[2];
    busy_d <= pmod0[3];
    n_ref  += pmod0[5];
    n_hits += pmod0[6];
    n_read += pmod0[7];
  end

  // Monte Carlo monitors.
  int mc_trials = 0, mc_errs = 0, mc_levels = 0, mc_total = 0;
  always @(negedge clk) if (mc_reset_n) begin
    if (mc_trial_done) begin
      int best;
      best = 0;
      for (int i = 1; i < N_HYP; i++) if (mc_p[i] > mc_p[best]) best = i;
      mc_trials++; mc_total++;
      if (mc_dec != mc_tgt) mc_errs++;
      checks++;
      if (mc_dec != 2'(best)) begin failures++; $display("FAIL Monte Carlo decision not the most probable"); end
    end
    if (mc_level_done) begin
      longint want;
      want = (longint'(MC_TRIALS - mc_errs) * 65536) / MC_TRIALS;
      $display("Monte Carlo level %0d: %0d errors in %0d trials, pc %f", mc_ks, mc_err, mc_trials, real'(mc_pc) / 65536.0);
      mc_levels++;
      checks += 3;
      if (mc_trials != MC_TRIALS) begin failures++; $display("FAIL trials %0d", mc_trials); end
      if (mc_err != mc_errs) begin failures++; $display("FAIL err_count %0d want %0d", mc_err, mc_errs); end
      if (longint'(mc_pc) - want > 1 || want - longint'(mc_pc) > 1) begin failures++; $display("FAIL pc"); end
      mc_trials = 0; mc_errs = 0;
    end
  end

  task automatic recognize(logic [1:0] tgt, real noise, logic [3:0] sw);
    int b0, r0, w0, t, lat;
    real sum;
    target = tgt; noise_amp = noise; dip = sw;
    b0 = bursts; r0 = returns; w0 = spi_words.size();
    repeat (6) begin
      @(negedge clk) button = ~button;
      repeat ($urandom_range(5000, 100)) @(negedge clk);
    end
    @(negedge clk) button = 1;
    lat = 0;
    while (!pmod0[3] && lat < 2 * STABLE) begin @(negedge clk); lat++; end
    checks++;
    if (lat < STABLE || lat > STABLE + 10) begin failures++; $display("FAIL start %0d clocks after the button settled", lat); end
    repeat (1000) @(negedge clk);
    button = 0;
    t = 0;
    while (pmod0[3] && t < 2_000_000) begin @(negedge clk); t++; end
    t = 0;
    while (spi_words.size() < w0 + 21 && t < 2_000_000) begin @(negedge clk); t++; end
    repeat (2000) @(negedge clk);
    $display("recognition target %0d: LEDs %b, %0d bursts, %0d returns, %0d SPI words",
             tgt, pmod1, bursts - b0, returns - r0, spi_words.size() - w0);
    checks += 4;
    if (bursts - b0 != 4)  begin failures++; $display("FAIL bursts %0d", bursts - b0); end
    if (returns - r0 != 4) begin failures++; $display("FAIL returns %0d", returns - r0); end
    if (spi_words.size() - w0 != 21) begin failures++; $display("FAIL SPI words %0d", spi_words.size() - w0); end
    if (pmod1 != ~(4'b0001 << tgt)) begin failures++; $display("FAIL LEDs %b for target %0d", pmod1, tgt); end
    else n_led++;
    if (spi_words.size() - w0 == 21) begin
      for (int f = 0; f < 4; f++) begin
        sum = 0.0;
        for (int i = 0; i < 4; i++) sum += real'(signed'(spi_words[w0 + 4 * f + i])) / 65536.0;
        checks++;
        if (fabs(sum - 1.0) > 0.003) begin failures++; $display("FAIL probabilities sum %f", sum); end
        else n_updates++;
      end
      checks++;
      if (spi_words[w0 + 20] != {26'd0, tgt, sw}) begin failures++; $display("FAIL status word %h", spi_words[w0 + 20]); end
      else n_status++;
    end
  endtask

  initial begin
    int b0, t;
    repeat (20) @(negedge clk);
    checks++;
    if (pmod1 != 4'b1111 || pmod0[3]) begin failures++; $display("FAIL reset state"); end
    reset = 0;
    mc_reset_n = 1;
    repeat (20) @(negedge clk);

    recognize(2'd1, 0.0, 4'b0011);

    b0 = bursts;
    t = 0;
    while (bursts == b0 && t < RETX + 100) begin @(negedge clk); t++; end
    repeat (1000) @(negedge clk);
    checks++;
    if (bursts == b0 + 1 && !pmod0[3]) n_retx++;
    else begin failures++; $display("FAIL retransmission"); end

    recognize(2'd3, 0.05, 4'b1100);

    if (!FULL_SIZE) begin
      t = 0;
      while (!mc_done && t < 20_000_000) begin @(negedge clk); t++; end
    end
    $display("mechanisms: starts %0d, reference words %0d, rx hits %0d, read clocks %0d, updates %0d, LEDs %0d, status %0d, retransmissions %0d, SPI words %0d, MC trials %0d, MC levels %0d, MC done %0d",
             n_start, n_ref, n_hits, n_read, n_updates, n_led, n_status, n_retx, spi_words.size(), mc_total, mc_levels, mc_done);
    checks += 12;
    if (n_start != 2)        begin failures++; $display("FAIL starts"); end
    if (n_ref != 9 * 4)      begin failures++; $display("FAIL reference words"); end
    if (n_hits != 8)         begin failures++; $display("FAIL rx hits"); end
    if (n_read != 8 * 240)   begin failures++; $display("FAIL read windows"); end
    if (n_updates != 8)      begin failures++; $display("FAIL updates"); end
    if (n_led != 2)          begin failures++; $display("FAIL LED decisions"); end
    if (n_status != 2)       begin failures++; $display("FAIL status words"); end
    if (n_retx != 1)         begin failures++; $display("FAIL retransmissions"); end
    if (bad_period != 0)     begin failures++; $display("FAIL sck period"); end
    if (mc_total == 0)       begin failures++; $display("FAIL no Monte Carlo trial"); end
    if (!FULL_SIZE && mc_levels != 2) begin failures++; $display("FAIL Monte Carlo levels %0d", mc_levels); end
    if (!FULL_SIZE && !mc_done)       begin failures++; $display("FAIL Monte Carlo run did not end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
