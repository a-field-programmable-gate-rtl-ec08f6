// tb_debounce: self-checking testbench for the push-button debouncer, at its
// default 10 ms (1 250 000 clock) stable time.
//
// The button is driven with bursts of bounce (random pulses shorter than the
// stable time), then held. Checked: the debounced level does not move during
// bounce; it follows a held press or release between STABLE and STABLE + 4
// clocks after the input settled; pressed pulses exactly once, for one clock,
// per debounced press and never on release. Watchdog: 200 ms of simulated
// time at 8 ns per clock.
module tb_debounce;
  localparam int STABLE = 1_250_000;
  logic clk = 0, reset_n = 0, button = 0;
  logic level, pressed;
  int checks = 0, failures = 0;
  int press_count = 0;

  debounce dut (.clk(clk), .reset_n(reset_n), .button(button), .level(level), .pressed(pressed));

  always #4 clk = ~clk;
  initial begin #200ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic pressed_d = 0;
  always @(posedge clk) begin
    if (reset_n && pressed) press_count++;
    if (reset_n && pressed && pressed_d) begin failures++; $display("FAIL pressed longer than one clock"); end
    pressed_d <= pressed;
  end

  task automatic bounce(logic final_value);
    logic start_level;
    int lat;
    start_level = level;
    repeat (8) begin
      @(negedge clk) button = ~button;
      repeat ($urandom_range(STABLE / 2, 1)) @(negedge clk);
    end
    checks++;
    if (level != start_level) begin failures++; $display("FAIL level moved during bounce"); end
    @(negedge clk) button = final_value;
    lat = 0;
    while (level != final_value && lat < 2 * STABLE) begin @(negedge clk); lat++; end
    checks++;
    if (lat < STABLE || lat > STABLE + 4) begin failures++; $display("FAIL settle time %0d", lat); end
  endtask

  initial begin
    int n_before;
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (level != 0 || pressed != 0) begin failures++; $display("FAIL reset state"); end
    for (int k = 0; k < 3; k++) begin
      n_before = press_count;
      bounce(1);
      repeat (5) @(negedge clk);
      checks++;
      if (press_count != n_before + 1) begin failures++; $display("FAIL press count %0d", press_count - n_before); end
      n_before = press_count;
      bounce(0);
      repeat (5) @(negedge clk);
      checks++;
      if (press_count != n_before) begin failures++; $display("FAIL pulse on release"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
