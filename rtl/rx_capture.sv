// rx_capture: finds a target return on the receiver link and stores it as 61
// complex Q15.16 samples.
//
// While rx_en is high the unit watches the in-phase value of each incoming
// word (rx_data[15:0], signed 16-bit with 15 fractional bits; quadrature in
// rx_data[31:16]). The first word whose in-phase value exceeds THRESH marks
// the reference pulse at the head of the return (rx_hit pulses). The unit
// skips the rest of the REF_LEN-word pulse, then opens a read window
// (rx_read high) of N_CAPTURE = 240 words. Each word is converted to Q15.16
// by sign extension (and a one-bit shift to align the 15 fractional bits)
// and the window is reduced to 61 samples: output sample n is the first word
// k of the window with 60*k >= 239*n, so the 61 samples span the window
// evenly from its first to its last word. rx_complete then rises and, with
// yy and yy_j, is held until rx_en falls.
//
// The threshold search for the reference pulse, the 240-sample read window,
// the sign extension to Q15.16 and the reduction to 61 samples are the
// document's; the threshold value, the word layout and the exact decimation
// rule are this design's.
module rx_capture
  import crr_pkg::*;
#(
  parameter logic signed [15:0] THRESH    = 16'sh1000,  // 0.125
  parameter int                 REF_LEN   = 4,
  parameter int                 N_CAPTURE = 240
) (
  input  logic         clk,
  input  logic         reset_n,
  input  logic         rx_en,
  input  logic [239:0] rx_data,
  output q16_t         yy   [N_CONV],
  output q16_t         yy_j [N_CONV],
  output logic         rx_hit,
  output logic         rx_read,
  output logic         rx_complete
);

  typedef enum logic [2:0] {R_IDLE, R_SEARCH, R_SKIP, R_READ, R_DONE} rx_state_e;

  rx_state_e   state;
  logic [7:0]  k;          // word index in the window / skip counter
  logic [5:0]  n;          // next output sample
  logic [15:0] acc_k;      // 60*k
  logic [15:0] acc_n;      // 239*n

  logic signed [15:0] rx_i, rx_q;
  assign rx_i = rx_data[15:0];
  assign rx_q = rx_data[31:16];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state       <= R_IDLE;
      k           <= '0;
      n           <= '0;
      acc_k       <= '0;
      acc_n       <= '0;
      rx_hit      <= 1'b0;
      rx_read     <= 1'b0;
      rx_complete <= 1'b0;
      for (int i = 0; i < N_CONV; i++) begin
        yy[i]   <= '0;
        yy_j[i] <= '0;
      end
    end else begin
      rx_hit <= 1'b0;
      unique case (state)
        R_IDLE: begin
          rx_complete <= 1'b0;
          if (rx_en) state <= R_SEARCH;
        end
        R_SEARCH: begin
          if (rx_i > THRESH) begin
            rx_hit <= 1'b1;
            k      <= 8'd1;
            if (REF_LEN <= 1) begin
              rx_read <= 1'b1;
              k       <= '0;
              state   <= R_READ;
            end else begin
              state   <= R_SKIP;
            end
            n     <= '0;
            acc_k <= '0;
            acc_n <= '0;
          end
        end
        R_SKIP: begin
          k <= k + 8'd1;
          if (k == 8'(REF_LEN - 1)) begin
            k       <= '0;
            rx_read <= 1'b1;
            state   <= R_READ;
          end
        end
        R_READ: begin
          if (acc_k >= acc_n && n < 6'(N_CONV)) begin
            yy[n]   <= q16_t'(rx_i) <<< 1;
            yy_j[n] <= q16_t'(rx_q) <<< 1;
            n       <= n + 6'd1;
            acc_n   <= acc_n + 16'd239;
          end
          k     <= k + 8'd1;
          acc_k <= acc_k + 16'd60;
          if (k == 8'(N_CAPTURE - 1)) begin
            rx_read     <= 1'b0;
            rx_complete <= 1'b1;
            state       <= R_DONE;
          end
        end
        R_DONE: begin
          if (!rx_en) begin
            rx_complete <= 1'b0;
            state       <= R_IDLE;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
