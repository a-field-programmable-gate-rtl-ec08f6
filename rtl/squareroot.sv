// squareroot: Q15.16 square root by linear search for the nearest square.
//
// A counter k, read as a Q15.16 number, starts at zero and steps by one LSB
// (2^-16) per clock. Each clock the square of k, k_product = (k*k) >> 16, is
// compared with the input; the first k whose square reaches or exceeds the
// input is the result. This is the document's algorithm: simple, accurate to
// the Q15.16 grid apart from the truncation of k_product, but slow: the
// latency is about sqrt(input) * 65536 clocks (65 536 for an input of 1.0).
// Inputs of zero or below return zero at once (no imaginary results). Reset
// behaviour and the exact cycle timing are this design's choices.
//
// Interface: enable/complete handshake. sqrt_input is taken when sqrt_en is
// seen high in idle; for a positive input whose root is r (in LSBs) the result
// appears with sqrt_complete r + 2 edges later. sqrt_result and sqrt_complete
// are held until sqrt_en falls.
module squareroot
  import crr_pkg::*;
(
  input  logic clk,
  input  logic reset_n,
  input  logic sqrt_en,
  input  q16_t sqrt_input,
  output q16_t sqrt_result,
  output logic sqrt_complete
);

  hs_state_e          state;
  q16_t               target;
  logic        [31:0] k;
  logic        [63:0] k_square;
  logic        [47:0] k_product;

  assign k_square  = 64'(k) * 64'(k);
  assign k_product = k_square[63:16];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state         <= HS_IDLE;
      target        <= '0;
      k             <= '0;
      sqrt_result   <= '0;
      sqrt_complete <= 1'b0;
    end else begin
      unique case (state)
        HS_IDLE: begin
          sqrt_complete <= 1'b0;
          if (sqrt_en) begin
            if (sqrt_input <= 0) begin
              sqrt_result   <= '0;
              sqrt_complete <= 1'b1;
              state         <= HS_DONE;
            end else begin
              target <= sqrt_input;
              k      <= '0;
              state  <= HS_BUSY;
            end
          end
        end
        HS_BUSY: begin
          if (k_product >= 48'(unsigned'(target))) begin
            sqrt_result   <= q16_t'(k);
            sqrt_complete <= 1'b1;
            state         <= HS_DONE;
          end else begin
            k <= k + 32'd1;
          end
        end
        HS_DONE: begin
          if (!sqrt_en) begin
            sqrt_complete <= 1'b0;
            state         <= HS_IDLE;
          end
        end
        default: state <= HS_IDLE;
      endcase
    end
  end

endmodule
