// division: signed Q15.16 divider, quotient = dividend / divisor.
//
// Works on magnitudes with a restoring (shift-and-subtract) long division: the
// dividend magnitude is widened to 48 bits and shifted left by 16 so that the
// integer quotient is already in Q15.16, and one quotient bit is produced per
// clock, MSB first (48 cycles). The sign is applied at the end. Special cases
// follow the document: a zero dividend, or a quotient smaller in magnitude
// than 0.001, gives 0; a divisor whose magnitude is at most 3.0518e-5 (2 LSBs,
// zero included) gives the largest Q15.16 value as "infinity". A quotient too
// large for Q15.16 is also clamped to the largest value of its sign; that
// clamp, the bit-serial algorithm and the 16 fractional quotient bits (the
// document quotes three decimal places) are this design's choices.
//
// Interface: enable/complete handshake. Operands are taken on the clock edge
// where division_en is seen high in idle. division_complete rises 50 clock
// edges later (start, 48 iterations, result) -- on the next edge for the
// special cases -- and, with quotient, is held until division_en falls; the
// unit is idle again on the edge after that.
module division
  import crr_pkg::*;
(
  input  logic clk,
  input  logic reset_n,
  input  logic division_en,
  input  q16_t dividend,
  input  q16_t divisor,
  output q16_t quotient,
  output logic division_complete
);

  localparam int NUM_W = 48;
  localparam q16_t MIN_FRACTION = 32'sd66;   // 0.001 in Q15.16, rounded up

  hs_state_e          state;
  logic [NUM_W-1:0]   num;      // remaining dividend bits, shifted out MSB first
  logic [NUM_W-1:0]   quo;      // quotient bits collected so far
  logic [32:0]        rem;      // partial remainder
  logic [31:0]        den;      // divisor magnitude
  logic               neg;
  logic [5:0]         bit_cnt;

  logic [31:0] a_mag, b_mag;
  assign a_mag = dividend[31] ? 32'(-dividend) : 32'(dividend);
  assign b_mag = divisor[31]  ? 32'(-divisor)  : 32'(divisor);

  // One restoring-division step.
  logic [32:0] rem_shift, rem_sub;
  assign rem_shift = {rem[31:0], num[NUM_W-1]};
  assign rem_sub   = rem_shift - {1'b0, den};

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state             <= HS_IDLE;
      num               <= '0;
      quo               <= '0;
      rem               <= '0;
      den               <= '0;
      neg               <= 1'b0;
      bit_cnt           <= '0;
      quotient          <= '0;
      division_complete <= 1'b0;
    end else begin
      unique case (state)
        HS_IDLE: begin
          division_complete <= 1'b0;
          if (division_en) begin
            if (b_mag <= 32'd2) begin
              quotient          <= Q_MAX;
              division_complete <= 1'b1;
              state             <= HS_DONE;
            end else if (dividend == '0) begin
              quotient          <= '0;
              division_complete <= 1'b1;
              state             <= HS_DONE;
            end else begin
              num     <= {a_mag, 16'h0000};
              den     <= b_mag;
              neg     <= dividend[31] ^ divisor[31];
              rem     <= '0;
              quo     <= '0;
              bit_cnt <= 6'(NUM_W);
              state   <= HS_BUSY;
            end
          end
        end
        HS_BUSY: begin
          num <= {num[NUM_W-2:0], 1'b0};
          if (!rem_sub[32]) begin
            rem <= rem_sub;
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= rem_shift;
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
          bit_cnt <= bit_cnt - 6'd1;
          if (bit_cnt == 6'd1) state <= HS_DONE;
        end
        HS_DONE: begin
          if (!division_complete) begin
            // Result of the last step is in quo; scale, clamp and sign it.
            division_complete <= 1'b1;
            if (quo[NUM_W-1:31] != '0)
              quotient <= neg ? -Q_MAX : Q_MAX;
            else if (quo[30:0] < 31'(MIN_FRACTION))
              quotient <= '0;
            else
              quotient <= neg ? -q16_t'({1'b0, quo[30:0]}) : q16_t'({1'b0, quo[30:0]});
          end else if (!division_en) begin
            division_complete <= 1'b0;
            state             <= HS_IDLE;
          end
        end
        default: state <= HS_IDLE;
      endcase
    end
  end

endmodule
