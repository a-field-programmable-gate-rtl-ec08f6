// tb_fir_filter: self-checking testbench for the complex 31-tap FIR.
//
// For each of the four target responses and random complex inputs (plus a
// unit impulse) the expected 61-sample convolution is computed here from the
// real-valued response tables, rounded to Q15.16 in this file, with each
// product truncated as the number format requires; the outputs must match it
// exactly. An impulse input must return the response itself. Also checked:
// fir_complete 62 edges after fir_en rises (counting the edge that sees it), and its release after
// fir_en falls. Watchdog: 1 ms.
module tb_fir_filter;
  import crr_pkg::*;
  import crr_tables_pkg::*;
  logic clk = 0, reset_n = 0, en = 0;
  logic [1:0] sel;
  q16_t x [N_TAPS], xj [N_TAPS];
  q16_t y [N_CONV], yj [N_CONV];
  logic done;
  int checks = 0, failures = 0;

  fir_filter dut (.clk(clk), .reset_n(reset_n), .fir_en(en), .sel(sel), .x(x), .x_j(xj),
                  .y(y), .y_j(yj), .fir_complete(done));

  always #4 clk = ~clk;
  initial begin #1ms; $display("watchdog timeout"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic longint rq(real r);
    return (r >= 0.0) ? longint'($floor(r * 65536.0 + 0.5)) : -longint'($floor(-r * 65536.0 + 0.5));
  endfunction
  function automatic longint tmul(longint a, longint b);
    return (a * b) >>> 16;
  endfunction

  task automatic run(int t);
    int lat;
    longint er, ei, hr, hi;
    @(negedge clk); sel = 2'(t); en = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 200);
    checks++;
    if (lat != 62) begin failures++; $display("FAIL latency %0d", lat); end
    for (int n = 0; n < N_CONV; n++) begin
      er = 0; ei = 0;
      for (int k = 0; k < N_TAPS; k++) begin
        if (n - k >= 0 && n - k < N_TAPS) begin
          hr = rq(H_RE_TAB[t][k]);
          hi = rq(H_IM_TAB[t][k]);
          er += tmul(x[n-k], hr) - tmul(xj[n-k], hi);
          ei += tmul(x[n-k], hi) + tmul(xj[n-k], hr);
        end
      end
      checks += 2;
      if (longint'(y[n]) != er)  begin failures++; $display("FAIL t%0d y[%0d] %0d want %0d", t, n, y[n], er); end
      if (longint'(yj[n]) != ei) begin failures++; $display("FAIL t%0d yj[%0d] %0d want %0d", t, n, yj[n], ei); end
    end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL complete not released"); end
  endtask

  initial begin
    sel = 0;
    foreach (x[n]) begin x[n] = 0; xj[n] = 0; end
    repeat (3) @(posedge clk);
    reset_n = 1;
    // impulse: output is the response itself
    x[0] = Q_ONE;
    for (int t = 0; t < N_HYP; t++) begin
      run(t);
      for (int k = 0; k < N_TAPS; k++) begin
        checks++;
        if (longint'(y[k]) != rq(H_RE_TAB[t][k]) || longint'(yj[k]) != rq(H_IM_TAB[t][k])) begin
          failures++; $display("FAIL impulse t%0d k%0d", t, k);
        end
      end
    end
    repeat (3) begin
      for (int t = 0; t < N_HYP; t++) begin
        foreach (x[n]) begin
          x[n]  = q16_t'(int'($urandom_range(4 * 65536)) - 2 * 65536);
          xj[n] = q16_t'(int'($urandom_range(4 * 65536)) - 2 * 65536);
        end
        run(t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
