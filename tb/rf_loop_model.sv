// rf_loop_model: behavioural stand-in for the RF loop of the radar test bed
// (transmitter, target, receiver), for simulation only.
//
// It watches the transmit link. A burst starts with a non-zero word that
// follows a zero word (so values left on the link before reset are ignored); the model collects REF_LEN reference words and then the
// 31 waveform samples (16-bit I in bits 15:0, Q in 31:16, 15 fractional
// bits). It convolves the samples, in real arithmetic, with the response of
// the target selected by `target` (taken from the same response tables as
// the design, i.e. the ideal target), adds uniform noise of +-noise_amp to
// every output value, and after DELAY clocks plays the return back on the
// receive link: REF_LEN reference words of in-phase 0.25, then 240 words in
// which word k carries return sample floor(60*k/239), so that the 61 return
// samples are spread over the 240-word capture window. Outside a return the
// receive link carries low-level noise (below the 0.125 detection threshold)
// when noise_amp is non-zero. bursts counts transmitted bursts and returns
// counts returns played back.
module rf_loop_model
  import crr_pkg::*;
  import crr_tables_pkg::*;
#(
  parameter int REF_LEN = 4,
  parameter int DELAY   = 100
) (
  input  logic         clk,
  input  logic [239:0] tx_data,
  input  logic [1:0]   target,
  input  real          noise_amp,
  output logic [239:0] rx_data,
  output int           bursts,
  output int           returns
);

  real  xr [N_TAPS], xi [N_TAPS];
  real  yr [N_CONV], yi [N_CONV];
  int   rx_cnt;
  logic tx_prev_zero;

  function automatic real rnd(real a);
    return a * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction
  function automatic logic [15:0] to16(real v);
    real s;
    s = v * 32768.0;
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return 16'(int'(s));
  endfunction

  initial begin
    rx_data = '0;
    bursts = 0;
    returns = 0;
    rx_cnt = 0;
  end

  // Capture a burst, form the return, play it back.
  initial begin
    tx_prev_zero = 1'b0;
    forever begin
      @(posedge clk);
      if (tx_data[31:0] == 32'd0) begin
        tx_prev_zero = 1'b1;
      end else if (tx_prev_zero) begin
        tx_prev_zero = 1'b0;
        // word 0 of the reference pulse is on the link now
        for (int w = 1; w < REF_LEN + N_TAPS; w++) begin
          @(posedge clk);
          if (w >= REF_LEN) begin
            xr[w-REF_LEN] = real'(signed'(tx_data[15:0])) / 32768.0;
            xi[w-REF_LEN] = real'(signed'(tx_data[31:16])) / 32768.0;
          end
        end
        bursts++;
        for (int n = 0; n < N_CONV; n++) begin
          yr[n] = 0.0; yi[n] = 0.0;
          for (int k = 0; k < N_TAPS; k++)
            if (n - k >= 0 && n - k < N_TAPS) begin
              yr[n] += xr[n-k] * H_RE_TAB[target][k] - xi[n-k] * H_IM_TAB[target][k];
              yi[n] += xr[n-k] * H_IM_TAB[target][k] + xi[n-k] * H_RE_TAB[target][k];
            end
          yr[n] += rnd(noise_amp);
          yi[n] += rnd(noise_amp);
        end
        // wait for the link to fall quiet, then the propagation delay
        while (tx_data[31:0] != 32'd0) @(posedge clk);
        tx_prev_zero = 1'b1;
        repeat (DELAY) @(posedge clk);
        for (int k = 0; k < REF_LEN + 240; k++) begin
          @(negedge clk);
          if (k < REF_LEN) rx_data = {224'd0, 16'h2000};
          else             rx_data = {208'd0, to16(yi[(60 * (k - REF_LEN)) / 239]), to16(yr[(60 * (k - REF_LEN)) / 239])};
        end
        @(negedge clk) rx_data = {208'd0, to16(rnd(noise_amp)), to16(rnd(noise_amp))};
        returns++;
      end
    end
  end

endmodule
