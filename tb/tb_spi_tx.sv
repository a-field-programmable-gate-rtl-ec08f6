// tb_spi_tx: self-checking testbench for the SPI transmitter at its default
// divider (512 clocks per bit, 244 kHz at 125 MHz).
//
// A receiver model in this file samples mosi on each rising sck edge while
// ss_n is low and rebuilds each word MSB first. For directed and random words
// it checks: the received word, exactly 32 sck pulses per frame, the sck
// period of 512 clocks, sck low whenever ss_n is high, busy lasting
// 32 * 512 clocks from the edge that accepts start, and that a start while
// busy is ignored. Watchdog: 20 ms.
module tb_spi_tx;
  localparam int DIV = 512;
  logic clk = 0, reset_n = 0, start = 0;
  logic [31:0] data;
  logic busy, sck, mosi, ss_n;
  int checks = 0, failures = 0;

  spi_tx dut (.clk(clk), .reset_n(reset_n), .start(start), .data(data), .busy(busy),
              .sck(sck), .mosi(mosi), .ss_n(ss_n));

  always #4 clk = ~clk;
  initial begin #20ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // Receiver model.
  logic [31:0] rx_word;
  int rx_bits, cyc, last_rise, bad_period, idle_sck;
  logic sck_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (ss_n && sck) idle_sck++;
    if (sck && !sck_d && !ss_n) begin
      rx_word = {rx_word[30:0], mosi};
      rx_bits++;
      if (rx_bits > 1 && cyc - last_rise != DIV) bad_period++;
      last_rise = cyc;
    end
    sck_d <= sck;
  end

  task automatic send(logic [31:0] w);
    int lat;
    rx_bits = 0;
    @(negedge clk); data = w; start = 1;
    @(negedge clk); start = 0;
    // a start request while busy must be ignored
    data = ~w; start = 1;
    @(negedge clk); start = 0;
    lat = 1;   // whole clocks busy has been high so far
    while (busy && lat < 40 * DIV) begin @(negedge clk); lat++; end
    checks += 3;
    if (rx_word != w || rx_bits != 32) begin failures++; $display("FAIL word %h bits %0d want %h", rx_word, rx_bits, w); end
    if (lat != 32 * DIV) begin failures++; $display("FAIL busy length %0d", lat); end
    if (!ss_n) begin failures++; $display("FAIL ss_n low after frame"); end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    data = 0; cyc = 0; bad_period = 0; idle_sck = 0; rx_word = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (!ss_n || sck || busy) begin failures++; $display("FAIL idle state"); end
    send(32'h8000_0001);
    send(32'h0001_0000);
    send(32'hA5A5_5A5A);
    repeat (5) send($urandom);
    checks += 2;
    if (bad_period) begin failures++; $display("FAIL sck period %0d times", bad_period); end
    if (idle_sck) begin failures++; $display("FAIL sck high while deselected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
