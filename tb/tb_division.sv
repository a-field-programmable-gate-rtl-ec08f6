// tb_division: self-checking testbench for the Q15.16 divider.
//
// Drives directed and random operand pairs through the enable/complete
// handshake and compares each quotient with a reference computed here in
// 64-bit integer arithmetic: |a|*2^16 / |b| truncated, signed, set to zero
// below 66 LSB (0.001), clamped to the largest value on overflow, and the
// largest positive value for a divisor of at most 2 LSB. It also checks the
// latency: 50 edges from the edge that sees division_en to division_complete
// for a normal division, 1 edge for the special cases. Watchdog: 2 ms.
module tb_division;
  import crr_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  q16_t a, b, q;
  logic done;
  int checks = 0, failures = 0;

  division dut (.clk(clk), .reset_n(reset_n), .division_en(en), .dividend(a),
                .divisor(b), .quotient(q), .division_complete(done));

  always #4 clk = ~clk;
  initial begin #2ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic q16_t ref_div(q16_t x, q16_t y);
    longint ax, ay, m;
    ax = (x < 0) ? -longint'(x) : longint'(x);
    ay = (y < 0) ? -longint'(y) : longint'(y);
    if (ay <= 2) return Q_MAX;
    if (x == 0) return 0;
    m = (ax <<< 16) / ay;
    if (m > 64'sh7FFFFFFF) return ((x < 0) != (y < 0)) ? -Q_MAX : Q_MAX;
    if (m < 66) return 0;
    return ((x < 0) != (y < 0)) ? q16_t'(-m) : q16_t'(m);
  endfunction

  task automatic run(q16_t x, q16_t y);
    int lat;
    q16_t e;
    bit special;
    e = ref_div(x, y);
    special = ((y < 0 ? -longint'(y) : longint'(y)) <= 2) || x == 0;
    @(negedge clk); a = x; b = y; en = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 200);
    checks++;
    if (q !== e) begin failures++; $display("FAIL %0d/%0d: got %0d want %0d", x, y, q, e); end
    checks++;
    if (lat != (special ? 1 : 50)) begin failures++; $display("FAIL latency %0d for %0d/%0d", lat, x, y); end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    run(to_q(1.0), to_q(4.0));        // 0.25
    run(to_q(-3.0), to_q(2.0));       // -1.5
    run(to_q(7.5), to_q(-0.5));       // -15
    run(to_q(1.0), 32'sd2);           // divisor within 2 LSB: infinity
    run(to_q(1.0), 32'sd0);
    run(32'sd0, to_q(5.0));           // zero dividend
    run(32'sd100, to_q(1000.0));      // below 0.001: zero
    run(to_q(30000.0), to_q(0.01));   // overflow clamp
    run(to_q(-30000.0), to_q(0.01));
    run(to_q(1.0), to_q(3.0));
    repeat (200) begin
      q16_t x, y;
      x = $urandom;
      y = $urandom;
      if ($urandom_range(1)) x = x >>> $urandom_range(20);
      if ($urandom_range(1)) y = y >>> $urandom_range(24);
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
