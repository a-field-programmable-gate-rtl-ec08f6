// tb_exponential: self-checking testbench for the table-based exponential.
//
// For directed and random Q15.16 inputs over -14 .. +14 the expected value is
// computed here with the real-valued $exp at the input rounded to the nearest
// 1/64 and clamped to -11.078125 .. 10.390625, then rounded to Q15.16; the
// result must match to 1 LSB plus 1e-6 relative. Also checked: the one-edge
// latency from the edge that sees exponential_en, and the release of
// complete after the enable falls. Watchdog: 2 ms.
module tb_exponential;
  import crr_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  q16_t x, y;
  logic done;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  exponential dut (.clk(clk), .reset_n(reset_n), .exponential_en(en), .exponential_input(x),
                   .exponential_result(y), .exponential_complete(done));

  always #4 clk = ~clk;
  initial begin #2ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic real ref_exp(q16_t v);
    real k;
    k = $floor(real'(v) / 1024.0 + 0.5);
    if (k > 665.0) k = 665.0;
    if (k < -709.0) k = -709.0;
    return $exp(k / 64.0);
  endfunction

  task automatic run(q16_t v);
    int lat;
    real e, tol;
    e = ref_exp(v) * 65536.0;
    tol = 1.0 + 1e-6 * e;
    @(negedge clk); x = v; en = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 20);
    checks++;
    if (fabs(real'(y) - e) > tol) begin failures++; $display("FAIL exp(%f): got %0d want %f", real'(v) / 65536.0, y, e); end
    checks++;
    if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    x = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    run(0);
    run(to_q(1.0));
    run(to_q(-1.0));
    run(to_q(10.390625));
    run(to_q(12.0));                    // clamped high
    run(to_q(-11.078125));
    run(to_q(-20.0));                   // clamped low
    run(to_q(0.5 / 64.0));
    repeat (300) run(q16_t'(int'($urandom_range(28 * 65536)) - 14 * 65536));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
