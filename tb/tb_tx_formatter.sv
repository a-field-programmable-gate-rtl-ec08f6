// tb_tx_formatter: self-checking testbench for the transmit burst formatter.
//
// Random waveforms (including values beyond +-1 that must saturate) are sent
// and every link word is recorded. Checked against values worked out here:
// the burst is 4 reference words (in-phase 0.25 = 16'h2000, quadrature 0)
// then the 31 samples, each in-phase in bits 15:0 and quadrature in 31:16 as
// 16-bit values with 15 fractional bits (the Q15.16 value halved in LSBs,
// rounded toward minus infinity, saturated), upper bits zero; tx_data_en
// high for exactly 35 clocks with the first word on the clock after start,
// tx_ref high on the first 4 only, one done pulse after the burst and
// tx_data zero outside it. Watchdog: 1 ms.
module tb_tx_formatter;
  import crr_pkg::*;
  logic clk = 0, reset_n = 0, start = 0;
  q16_t xr [N_TAPS], xi [N_TAPS];
  logic [239:0] tx_data;
  logic tx_en, tx_ref, done;
  int checks = 0, failures = 0;

  tx_formatter dut (.clk(clk), .reset_n(reset_n), .start(start), .x_re(xr), .x_im(xi),
                    .tx_data(tx_data), .tx_data_en(tx_en), .tx_ref(tx_ref), .done(done));

  always #4 clk = ~clk;
  initial begin #1ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [15:0] ref_iq(q16_t v);
    longint h;
    h = longint'(v) >>> 1;
    if (h > 32767) h = 32767;
    if (h < -32768) h = -32768;
    return 16'(h);
  endfunction

  task automatic burst();
    int n_words, n_done;
    logic [239:0] want;
    foreach (xr[n]) begin
      xr[n] = q16_t'(int'($urandom_range(5 * 65536)) - int'(5 * 65536 / 2));
      xi[n] = q16_t'(int'($urandom_range(5 * 65536)) - int'(5 * 65536 / 2));
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n_words = 0; n_done = 0;
    for (int c = 0; c < 45; c++) begin
      if (tx_en) begin
        if (n_words < 4) want = {224'd0, 16'h2000};
        else             want = {208'd0, ref_iq(xi[n_words-4]), ref_iq(xr[n_words-4])};
        checks += 2;
        if (tx_data != want) begin failures++; $display("FAIL word %0d %h want %h", n_words, tx_data[31:0], want[31:0]); end
        if (tx_ref != (n_words < 4)) begin failures++; $display("FAIL tx_ref at word %0d", n_words); end
        n_words++;
      end else begin
        checks++;
        if (tx_data != '0 || tx_ref) begin failures++; $display("FAIL link not idle"); end
      end
      if (done) n_done++;
      @(negedge clk);
    end
    checks += 2;
    if (n_words != 35) begin failures++; $display("FAIL burst length %0d", n_words); end
    if (n_done != 1) begin failures++; $display("FAIL done pulses %0d", n_done); end
  endtask

  initial begin
    foreach (xr[n]) begin xr[n] = 0; xi[n] = 0; end
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (tx_en || tx_data != '0) begin failures++; $display("FAIL idle after reset"); end
    // first word must be on the link the clock after start
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!tx_en || tx_data[15:0] != 16'h2000) begin failures++; $display("FAIL first word timing"); end
    repeat (40) @(negedge clk);
    repeat (6) burst();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
