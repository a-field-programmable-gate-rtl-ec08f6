// crr_pkg: shared number format and sizes of the cognitive radar (PWE) target
// recognition datapath.
//
// Every datapath value is a signed 32-bit Q15.16 fixed-point number: bit 31 is
// the sign, bits 30..16 the integer part and bits 15..0 the fraction, giving a
// range of -32768 to about 32767.99998 in steps of 2^-16. A product of two
// Q15.16 numbers is formed at 64 bits and shifted right by 16 to return to
// Q15.16 (bits 47..16 of the full product are kept). These rules follow the
// document. The shared sizes (4 hypotheses, 31-sample waveforms and target
// responses, 61-sample returns) are also the document's.
package crr_pkg;

  typedef logic signed [31:0] q16_t;

  localparam int N_HYP  = 4;               // stored target hypotheses
  localparam int N_TAPS = 31;              // samples per waveform / target response
  localparam int N_CONV = 2 * N_TAPS - 1;  // samples of a full convolution (61)

  localparam q16_t Q_ONE     = 32'sh0001_0000;  // 1.0
  localparam q16_t Q_QUARTER = 32'sh0000_4000;  // 0.25, the equal prior 1/4
  localparam q16_t Q_MAX     = 32'sh7FFF_FFFF;  // largest value, used as "infinity"

  // Q15.16 multiply: 64-bit product, arithmetic shift right by 16, keep 32 bits.
  function automatic q16_t qmul(input q16_t a, input q16_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return q16_t'(p >>> 16);
  endfunction

  // Real number to Q15.16, rounded to nearest (elaboration-time use only).
  function automatic q16_t to_q(input real r);
    return q16_t'($rtoi(r * 65536.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Inter-module handshake used by all processing units: the requester raises
  // enable with its operands and holds it; the unit answers with complete and
  // holds its result until enable falls.
  typedef enum logic [1:0] {HS_IDLE, HS_BUSY, HS_DONE} hs_state_e;

endpackage
