// tb_crr_processor: end-to-end testbench of the radar processor with its
// default parameters (10 ms debounce, 244 kHz SPI, 100 ms retransmission),
// closed through the behavioural RF loop model.
//
// Sequence: reset; a bouncing button press starts a recognition with the
// loop's target set to 2 and the DIP switches at 1010; after the processor
// returns to idle the testbench waits for one periodic retransmission; then
// a second recognition with target 0 and noisy returns. An SPI receiver model
// here rebuilds every 32-bit word from sck/mosi/ss_n.
//
// Checked, each against values worked out here: LEDs off after reset; the
// processor starts STABLE..STABLE+10 clocks after the button settles; the
// first burst carries the equal-probability waveform 0.5*(se0+se1+se2+se3)
// within 3 LSB; four bursts and four captured returns per recognition (rx_hit
// and a 240-clock read window each); after each update a 4-word SPI frame of
// probabilities summing to one within 0.003; after the decision a 5-word
// frame whose fifth word holds the decision and DIP setting; the lit LED is
// the true target; the sck period is 512 clocks; a retransmission in idle
// repeats the last burst within RETX_PERIOD + 100 clocks. Each mechanism is
// counted, and one that never happened counts a failure. Watchdog: 400 ms.
module tb_crr_processor;
  import crr_pkg::*;
  import crr_tables_pkg::*;
  localparam int STABLE = 1_250_000;
  localparam int RETX   = 12_500_000;
  logic clk = 0;
  logic [3:0] dip = 0;
  logic button = 0, reset = 1;
  logic [239:0] rx_data, tx_data;
  logic [7:0] pmod0;
  logic [3:0] pmod1;
  logic [1:0] target = 2;
  real noise_amp = 0.0;
  int bursts, returns;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  crr_processor dut (
    .clk(clk), .GPIO_DIP_SW1(dip[0]), .GPIO_DIP_SW2(dip[1]), .GPIO_DIP_SW3(dip[2]), .GPIO_DIP_SW4(dip[3]),
    .GPIO_SW_C(button), .RESET(reset), .RX_DATA(rx_data), .TX_XPWE(tx_data),
    .PMOD0_0_LS(pmod0[0]), .PMOD0_1_LS(pmod0[1]), .PMOD0_2_LS(pmod0[2]), .PMOD0_3_LS(pmod0[3]),
    .PMOD0_4_LS(pmod0[4]), .PMOD0_5_LS(pmod0[5]), .PMOD0_6_LS(pmod0[6]), .PMOD0_7_LS(pmod0[7]),
    .PMOD1_0_LS(pmod1[0]), .PMOD1_1_LS(pmod1[1]), .PMOD1_2_LS(pmod1[2]), .PMOD1_3_LS(pmod1[3]));

  rf_loop_model u_rf (.clk(clk), .tx_data(tx_data), .target(target), .noise_amp(noise_amp),
                      .rx_data(rx_data), .bursts(bursts), .returns(returns));

  always #4ns clk = ~clk;
  initial begin #400ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // Monitors: SPI receiver, test points, mechanism counters.
  logic [31:0] spi_words [$];
  logic [31:0] shreg;
  int nbits = 0, cyc = 0, last_rise = 0, bad_period = 0, sck_rises = 0;
  int hits = 0, read_clocks = 0, ref_words = 0, tx_words = 0;
  logic sck_d = 0, ss_d = 1;
  always @(posedge clk) if (!reset) begin
    cyc++;
    if (pmod0[0] && !sck_d && !pmod0[2]) begin
      shreg = {shreg[30:0], pmod0[1]};
      nbits++;
      if (nbits > 1 && cyc - last_rise != 512) bad_period++;
      sck_rises++;
      last_rise = cyc;
    end
    if (pmod0[2] && !ss_d) begin
      if (nbits == 32) spi_words.push_back(shreg);
      else begin failures++; $display("FAIL SPI frame of %0d bits", nbits); end
      nbits = 0;
    end
    sck_d <= pmod0[0];
    ss_d  <= pmod0[2];
    hits        += pmod0[6];
    read_clocks += pmod0[7];
    ref_words   += pmod0[5];
    tx_words    += pmod0[4];
  end

  // Record each burst's samples from the transmit link.
  logic [31:0] burst_words [$];
  logic [31:0] first_burst [N_TAPS], last_burst [N_TAPS];
  int burst_no = 0;
  always @(posedge clk) if (!reset) begin
    if (pmod0[4] && !pmod0[5]) burst_words.push_back(tx_data[31:0]);
    if (burst_words.size() == N_TAPS) begin
      for (int n = 0; n < N_TAPS; n++) begin
        if (burst_no == 0) first_burst[n] = burst_words[n];
        last_burst[n] = burst_words[n];
      end
      burst_no++;
      burst_words.delete();
    end
  end

  task automatic press();
    int lat;
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
  endtask

  // One recognition: press, wait for idle, check the results.
  task automatic recognize(logic [1:0] tgt, real noise, logic [3:0] sw);
    int b0, r0, h0, rd0, w0, t;
    real sum;
    target = tgt; noise_amp = noise; dip = sw;
    b0 = bursts; r0 = returns; h0 = hits; rd0 = read_clocks; w0 = spi_words.size();
    press();
    t = 0;
    while (pmod0[3] && t < 2_000_000) begin @(negedge clk); t++; end
    // let the SPI frames drain: 21 words of 32 bits
    t = 0;
    while (spi_words.size() < w0 + 21 && t < 2_000_000) begin @(negedge clk); t++; end
    repeat (2000) @(negedge clk);
    $display("recognition target %0d: LEDs %b, %0d bursts, %0d returns, %0d SPI words",
             tgt, pmod1, bursts - b0, returns - r0, spi_words.size() - w0);
    checks += 6;
    if (bursts - b0 != 4)   begin failures++; $display("FAIL bursts %0d", bursts - b0); end
    if (returns - r0 != 4)  begin failures++; $display("FAIL returns %0d", returns - r0); end
    if (hits - h0 != 4)     begin failures++; $display("FAIL rx hits %0d", hits - h0); end
    if (read_clocks - rd0 != 4 * 240) begin failures++; $display("FAIL read window clocks %0d", read_clocks - rd0); end
    if (spi_words.size() - w0 != 21) begin failures++; $display("FAIL SPI words %0d", spi_words.size() - w0); end
    if (pmod1 != ~(4'b0001 << tgt)) begin failures++; $display("FAIL LEDs %b for target %0d", pmod1, tgt); end
    if (spi_words.size() - w0 == 21) begin
      for (int f = 0; f < 4; f++) begin
        sum = 0.0;
        for (int i = 0; i < 4; i++) sum += real'(signed'(spi_words[w0 + 4 * f + i])) / 65536.0;
        $display("  update %0d: %f %f %f %f", f, real'(signed'(spi_words[w0 + 4 * f])) / 65536.0,
                 real'(signed'(spi_words[w0 + 4 * f + 1])) / 65536.0, real'(signed'(spi_words[w0 + 4 * f + 2])) / 65536.0,
                 real'(signed'(spi_words[w0 + 4 * f + 3])) / 65536.0);
        checks++;
        if (fabs(sum - 1.0) > 0.003) begin failures++; $display("FAIL probabilities sum %f", sum); end
      end
      checks += 2;
      for (int i = 0; i < 4; i++)
        if (spi_words[w0 + 16 + i] != spi_words[w0 + 12 + i]) begin failures++; $display("FAIL final frame"); break; end
      if (spi_words[w0 + 20] != {26'd0, tgt, sw}) begin failures++; $display("FAIL status word %h", spi_words[w0 + 20]); end
    end
  endtask

  initial begin
    int b0, t;
    logic [15:0] want_i, want_q;
    real vr, vi;
    repeat (20) @(negedge clk);
    checks++;
    if (pmod1 != 4'b1111 || pmod0[3]) begin failures++; $display("FAIL reset state"); end
    reset = 0;
    repeat (20) @(negedge clk);

    recognize(2'd2, 0.0, 4'b1010);

    // first burst: the waveform for equal probabilities
    for (int n = 0; n < N_TAPS; n++) begin
      vr = 0.0; vi = 0.0;
      for (int i = 0; i < N_HYP; i++) begin vr += 0.5 * SE_RE_TAB[i][n]; vi += 0.5 * SE_IM_TAB[i][n]; end
      checks++;
      if (fabs(real'(signed'(first_burst[n][15:0])) - vr * 32768.0) > 3.0 ||
          fabs(real'(signed'(first_burst[n][31:16])) - vi * 32768.0) > 3.0) begin
        failures++; $display("FAIL first burst sample %0d: %h want %f %f", n, first_burst[n], vr, vi);
      end
    end

    // periodic retransmission of the last waveform
    b0 = bursts;
    burst_no = 1;
    t = 0;
    while (bursts == b0 && t < RETX + 100) begin @(negedge clk); t++; end
    repeat (1000) @(negedge clk);   // let its echo finish
    checks += 2;
    if (bursts != b0 + 1) begin failures++; $display("FAIL no retransmission after %0d clocks", t); end
    else $display("retransmission after %0d clocks in idle", t);
    if (pmod0[3]) begin failures++; $display("FAIL retransmission left idle"); end

    recognize(2'd0, 0.05, 4'b0110);

    checks += 6;
    if (bad_period) begin failures++; $display("FAIL sck period wrong %0d times", bad_period); end
    if (sck_rises == 0) begin failures++; $display("FAIL no SPI clock"); end
    if (ref_words == 0) begin failures++; $display("FAIL no reference pulse"); end
    if (tx_words != 9 * 35) begin failures++; $display("FAIL transmit words %0d", tx_words); end
    if (hits == 0) begin failures++; $display("FAIL no rx hit"); end
    if (read_clocks == 0) begin failures++; $display("FAIL no read window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
