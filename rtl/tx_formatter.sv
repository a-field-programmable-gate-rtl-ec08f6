// tx_formatter: streams one transmit burst to the RF transmitter link.
//
// On start (while idle) the unit sends REF_LEN words of a reference pulse
// (in-phase REF_AMP, quadrature zero), which lets the receiver find the start
// of the return, followed by the 31 complex samples of the adaptive waveform
// x, one word per clock. Each word carries one IQ sample: the in-phase value
// in tx_data[15:0] and the quadrature value in tx_data[31:16], both signed
// 16-bit with 15 fractional bits (Q15.16 bits 16..1, saturated to -1 ..
// 1-2^-15); the upper bits are zero. tx_data_en is high while a burst is on
// the link and tx_ref while the reference pulse is. tx_data is zero outside
// a burst.
//
// The reference pulse at the head of each burst and the conversion of Q15.16
// samples to the link's IQ format are the document's; the link's own packet
// layout is proprietary and not given, so the word layout, the 16-bit sample
// format, the pulse shape and its length are this design's.
//
// Timing: the first word is on tx_data on the clock after start; the burst is
// REF_LEN + 31 clocks long; done pulses for one clock after the last word.
module tx_formatter
  import crr_pkg::*;
#(
  parameter int   REF_LEN = 4,
  parameter q16_t REF_AMP = 32'sh0000_4000   // 0.25
) (
  input  logic         clk,
  input  logic         reset_n,
  input  logic         start,
  input  q16_t         x_re [N_TAPS],
  input  q16_t         x_im [N_TAPS],
  output logic [239:0] tx_data,
  output logic         tx_data_en,
  output logic         tx_ref,
  output logic         done
);

  localparam int LEN = REF_LEN + N_TAPS;

  // Q15.16 to signed 16-bit Q1.15 with saturation.
  function automatic logic [15:0] to_iq16(input q16_t v);
    if (v >= 32'sh0001_0000)      return 16'h7FFF;
    else if (v < -32'sh0001_0000) return 16'h8000;
    else                          return v[16:1];
  endfunction

  logic [5:0] idx;
  logic [4:0] smp;
  assign smp = 5'(idx - 6'(REF_LEN));

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      idx        <= '0;
      tx_data    <= '0;
      tx_data_en <= 1'b0;
      tx_ref     <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!tx_data_en) begin
        tx_data <= '0;
        tx_ref  <= 1'b0;
        if (start) begin
          tx_data_en <= 1'b1;
          tx_ref     <= 1'b1;
          tx_data    <= {208'd0, 16'd0, to_iq16(REF_AMP)};
          idx        <= 6'd1;
        end
      end else if (idx == 6'(LEN)) begin
        tx_data_en <= 1'b0;
        tx_ref     <= 1'b0;
        tx_data    <= '0;
        done       <= 1'b1;
      end else begin
        idx <= idx + 6'd1;
        if (idx < 6'(REF_LEN)) begin
          tx_data <= {208'd0, 16'd0, to_iq16(REF_AMP)};
        end else begin
          tx_ref  <= 1'b0;
          tx_data <= {208'd0, to_iq16(x_im[smp]), to_iq16(x_re[smp])};
        end
      end
    end
  end

endmodule
