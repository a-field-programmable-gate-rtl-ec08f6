// tb_rx_capture: self-checking testbench for the receive capture unit.
//
// The link is driven with low-level words (below the 0.125 threshold) for a
// random time, then a 4-word reference pulse of 0.25, then 240 random words,
// then more low-level words. The expected 61 samples are picked here: sample
// n is window word ceil(239*n/60), its 16-bit halves sign-extended and
// doubled into Q15.16. Checked: all 122 values, one rx_hit pulse, rx_read
// high for exactly 240 clocks starting on the first word after the pulse,
// rx_complete held until rx_en falls, and that nothing is captured while
// rx_en is low. Watchdog: 2 ms.
module tb_rx_capture;
  import crr_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  logic [239:0] rx_data;
  q16_t yy [N_CONV], yyj [N_CONV];
  logic hit, rd, done;
  int checks = 0, failures = 0;

  rx_capture dut (.clk(clk), .reset_n(reset_n), .rx_en(en), .rx_data(rx_data), .yy(yy), .yy_j(yyj),
                  .rx_hit(hit), .rx_read(rd), .rx_complete(done));

  always #4 clk = ~clk;
  initial begin #2ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [15:0] quiet();
    return 16'(int'($urandom_range(16'h1000 * 2)) - 16'h1000);   // -0.125 .. 0.125
  endfunction

  task automatic capture(bit armed);
    logic [15:0] wi [240], wq [240];
    int hits, reads, first_read, c, idx;
    foreach (wi[k]) begin wi[k] = 16'($urandom); wq[k] = 16'($urandom); end
    @(negedge clk); en = armed;
    hits = 0; reads = 0; first_read = -1; c = 0;
    repeat ($urandom_range(30, 3)) begin
      rx_data = {208'd0, quiet(), quiet()};
      @(negedge clk); c++;
      hits += hit; reads += rd;
    end
    for (int k = 0; k < 4 + 240 + 20; k++) begin
      if (k < 4)        rx_data = {224'd0, 16'h2000};
      else if (k < 244) rx_data = {$urandom, 176'd0, wq[k-4], wi[k-4]};   // upper bits ignored
      else              rx_data = {208'd0, quiet(), quiet()};
      #1;
      if (rd) begin              // read window open while this word is on the link
        reads++;
        if (first_read < 0) first_read = k;
      end
      @(posedge clk); #1;
      hits += hit;
      @(negedge clk);
    end
    if (!armed) begin
      checks++;
      if (hits || reads || done) begin failures++; $display("FAIL activity while disarmed"); end
      return;
    end
    checks += 4;
    if (hits != 1) begin failures++; $display("FAIL hits %0d", hits); end
    if (reads != 240) begin failures++; $display("FAIL read window %0d", reads); end
    if (first_read != 4) begin failures++; $display("FAIL read window starts at word %0d", first_read); end
    if (!done) begin failures++; $display("FAIL complete not raised"); end
    for (int n = 0; n < N_CONV; n++) begin
      idx = (239 * n + 59) / 60;
      checks += 2;
      if (yy[n] != q16_t'(32'(signed'(wi[idx])) * 2)) begin failures++; $display("FAIL yy[%0d] %0d word %0d", n, yy[n], idx); end
      if (yyj[n] != q16_t'(32'(signed'(wq[idx])) * 2)) begin failures++; $display("FAIL yyj[%0d]", n); end
    end
    en = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    rx_data = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    capture(0);
    repeat (5) capture(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
