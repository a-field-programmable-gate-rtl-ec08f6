// tb_squareroot: self-checking testbench for the linear-search square root.
//
// For directed and random Q15.16 inputs (0 .. 40.0, plus negative inputs)
// the expected result is found here independently: r = ceil-search root
// computed from the real square root, then corrected so that r is the
// smallest value with (r*r)>>16 >= input. The testbench checks the result,
// the latency (r + 2 edges from the edge that sees sqrt_en; 1 edge for
// inputs <= 0), that the result is within 1e-4 of the real square root, and
// that complete is released after the enable falls. Watchdog: 100 ms.
module tb_squareroot;
  import crr_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  q16_t x, r;
  logic done;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  squareroot dut (.clk(clk), .reset_n(reset_n), .sqrt_en(en), .sqrt_input(x),
                  .sqrt_result(r), .sqrt_complete(done));

  always #4 clk = ~clk;
  initial begin #100ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic longint ref_root(q16_t v);
    longint k;
    if (v <= 0) return 0;
    k = longint'($sqrt(real'(v) * 65536.0)) - 2;
    if (k < 0) k = 0;
    while (((k * k) >>> 16) < longint'(v)) k++;
    return k;
  endfunction

  task automatic run(q16_t v);
    int lat;
    longint e;
    e = ref_root(v);
    @(negedge clk); x = v; en = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 3000000);
    checks++;
    if (longint'(r) != e) begin failures++; $display("FAIL sqrt(%0d): got %0d want %0d", v, r, e); end
    checks++;
    if (lat != ((v <= 0) ? 1 : int'(e) + 2)) begin failures++; $display("FAIL latency %0d for %0d", lat, v); end
    if (v > 0) begin
      checks++;
      if (fabs(real'(r) / 65536.0 - $sqrt(real'(v) / 65536.0)) > 1e-4) begin
        failures++; $display("FAIL accuracy sqrt(%0d) = %0d", v, r);
      end
    end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    x = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    run(to_q(1.0));
    run(to_q(0.25));
    run(to_q(2.0));
    run(32'sd1);
    run(32'sd0);
    run(to_q(-4.0));
    run(to_q(16.0));
    repeat (40) run(q16_t'($urandom_range(40 * 65536, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
