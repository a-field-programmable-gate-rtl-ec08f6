// crr_processor: the cognitive radar target recognition processor of the
// FPGA-in-the-loop radar.
//
// A debounced press of the centre push button starts one recognition. The
// processor builds the first PWE waveform with equal probabilities 1/4,
// sends it, behind a reference pulse, to the RF transmitter link (TX_XPWE),
// captures the target return from the receiver link (RX_DATA) once the
// reference pulse is seen, updates the four hypothesis probabilities from
// the return, and builds the next waveform from them. After N_ITER
// transmit/receive cycles the most probable hypothesis is the decision and
// lights its LED. Back in idle, the last waveform is sent again every
// RETX_PERIOD clocks so it can be watched on the RF equipment. After every
// probability update the four probabilities are sent as four Q15.16 words
// on a write-only SPI port for a logic analyzer.
//
// Sequence (13 steps, as in the document): 0 idle, wait for the button and
// capture the DIP switches; 1 first waveform; 2 transmit; 3 receive;
// 4..8 per-hypothesis convolution and likelihood terms; 9 pdf values;
// 10 probability update; 11 new waveform, next iteration; 12 decision.
// Steps 4..10 run in pwe_update. The waveform is not normalized here
// (xpwe NORMALIZE = 0): the transmit power is set on the RF generator.
//
// Pins: PMOD0_0..2 are SPI sck, mosi and /ss; PMOD0_3 is busy (not idle);
// PMOD0_4..7 are test points TX_DATA_EN (burst on the transmit link), TX
// (reference pulse being sent), RX_FIFO (reference pulse detected) and
// RX_READ (receive window open). PMOD1_0..3 drive active-low LEDs for
// target0..target3. RESET is active high. The DIP switch settings are
// captured in idle and sent as the low four bits of a fifth SPI word after
// the decision, as the document gives them no other function.
//
// The I/O list, the state sequence, the SPI rate, the LED polarity and the
// PMOD0_0..3 assignment are the document's; PMOD0_4..7, the link word
// layout (see tx_formatter and rx_capture), the retransmit period, the
// likelihood scaling INV_NOISE_VAR and the SPI framing are this design's.
module crr_processor
  import crr_pkg::*;
#(
  parameter int unsigned       N_ITER          = 4,
  parameter int unsigned       DEBOUNCE_CYCLES = 1_250_000,    // 10 ms
  parameter int unsigned       SCK_DIV         = 512,          // 244 kHz SPI
  parameter int unsigned       RETX_PERIOD     = 12_500_000,   // 100 ms
  parameter int                REF_LEN         = 4,
  parameter q16_t              REF_AMP         = 32'sh0000_4000,
  parameter logic signed [15:0] RX_THRESH      = 16'sh1000,
  parameter q16_t              INV_NOISE_VAR   = 32'sd122880    // 1.875
) (
  input  logic         clk,
  input  logic         GPIO_DIP_SW1,
  input  logic         GPIO_DIP_SW2,
  input  logic         GPIO_DIP_SW3,
  input  logic         GPIO_DIP_SW4,
  input  logic         GPIO_SW_C,
  input  logic         RESET,
  input  logic [239:0] RX_DATA,
  output logic [239:0] TX_XPWE,
  output logic         PMOD0_0_LS,
  output logic         PMOD0_1_LS,
  output logic         PMOD0_2_LS,
  output logic         PMOD0_3_LS,
  output logic         PMOD0_4_LS,
  output logic         PMOD0_5_LS,
  output logic         PMOD0_6_LS,
  output logic         PMOD0_7_LS,
  output logic         PMOD1_0_LS,
  output logic         PMOD1_1_LS,
  output logic         PMOD1_2_LS,
  output logic         PMOD1_3_LS
);

  typedef enum logic [3:0] {
    P_IDLE, P_XPWE0, P_READ_XPWE0, P_TX, P_RX, P_UPDATE, P_READ_UPDATE,
    P_XPWE, P_READ_XPWE, P_CLASSIFY
  } proc_state_e;

  logic reset_n;
  assign reset_n = ~RESET;

  proc_state_e state;
  logic [2:0]  iter;
  logic [3:0]  dip;
  logic        have_wave;
  logic [31:0] retx_cnt;
  q16_t        ptheta [N_HYP];
  q16_t        x_re   [N_TAPS];
  q16_t        x_im   [N_TAPS];

  // Push button.
  logic btn_level, btn_pressed;

  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
    .clk     (clk),
    .reset_n (reset_n),
    .button  (GPIO_SW_C),
    .level   (btn_level),
    .pressed (btn_pressed)
  );

  // Waveform generator.
  logic xpwe_en, xpwe_done;
  q16_t xs_re [N_TAPS];
  q16_t xs_im [N_TAPS];

  xpwe #(.NORMALIZE(1'b0)) u_xpwe (
    .clk                 (clk),
    .reset_n             (reset_n),
    .xpwe_en             (xpwe_en),
    .ptheta              (ptheta),
    .squareroot_Es_input (Q_ONE),
    .s                   (xs_re),
    .s_j                 (xs_im),
    .xpwe_complete       (xpwe_done)
  );

  // Transmit link.
  logic tx_start, tx_en, tx_ref, tx_done;

  tx_formatter #(.REF_LEN(REF_LEN), .REF_AMP(REF_AMP)) u_tx (
    .clk        (clk),
    .reset_n    (reset_n),
    .start      (tx_start),
    .x_re       (x_re),
    .x_im       (x_im),
    .tx_data    (TX_XPWE),
    .tx_data_en (tx_en),
    .tx_ref     (tx_ref),
    .done       (tx_done)
  );

  // Receive link.
  logic rx_en, rx_hit, rx_read, rx_done;
  q16_t yy   [N_CONV];
  q16_t yy_j [N_CONV];

  rx_capture #(.THRESH(RX_THRESH), .REF_LEN(REF_LEN)) u_rx (
    .clk         (clk),
    .reset_n     (reset_n),
    .rx_en       (rx_en),
    .rx_data     (RX_DATA),
    .yy          (yy),
    .yy_j        (yy_j),
    .rx_hit      (rx_hit),
    .rx_read     (rx_read),
    .rx_complete (rx_done)
  );

  // Likelihoods and probability update.
  logic upd_en, upd_done;
  q16_t p_new [N_HYP];

  pwe_update u_update (
    .clk             (clk),
    .reset_n         (reset_n),
    .update_en       (upd_en),
    .x               (x_re),
    .x_j             (x_im),
    .yy              (yy),
    .yy_j            (yy_j),
    .ptheta_in       (ptheta),
    .inv_noise_var   (INV_NOISE_VAR),
    .ptheta_out      (p_new),
    .update_complete (upd_done)
  );

  // SPI read-out: frames of up to five words, queued one frame deep.
  logic        spi_start, spi_busy, spi_sck, spi_mosi, spi_ss_n;
  logic [31:0] frame_q   [5];    // frame waiting to be sent
  logic [2:0]  frame_len_q;
  logic        frame_pending;
  logic [31:0] send_buf  [5];
  logic [2:0]  send_len, send_idx;
  logic        sending;
  logic        frame_req;
  logic [31:0] frame_new [5];
  logic [2:0]  frame_new_len;

  spi_tx #(.SCK_DIV(SCK_DIV)) u_spi (
    .clk     (clk),
    .reset_n (reset_n),
    .start   (spi_start),
    .data    (send_buf[send_idx]),
    .busy    (spi_busy),
    .sck     (spi_sck),
    .mosi    (spi_mosi),
    .ss_n    (spi_ss_n)
  );

  assign spi_start = sending && !spi_busy;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      frame_pending <= 1'b0;
      frame_len_q   <= '0;
      send_len      <= '0;
      send_idx      <= '0;
      sending       <= 1'b0;
      for (int i = 0; i < 5; i++) begin
        frame_q[i]  <= '0;
        send_buf[i] <= '0;
      end
    end else begin
      if (frame_req) begin
        frame_q       <= frame_new;
        frame_len_q   <= frame_new_len;
        frame_pending <= 1'b1;
      end
      if (!sending) begin
        if (frame_pending && !frame_req) begin
          send_buf      <= frame_q;
          send_len      <= frame_len_q;
          send_idx      <= '0;
          sending       <= 1'b1;
          frame_pending <= 1'b0;
        end
      end else if (spi_start) begin
        // word send_idx has been accepted by the transmitter
        if (send_idx == send_len - 3'd1) sending <= 1'b0;
        else                             send_idx <= send_idx + 3'd1;
      end
    end
  end

  // MAP decision.
  logic [1:0] map_idx;
  always_comb begin
    map_idx = 2'd0;
    for (int i = 1; i < N_HYP; i++)
      if (ptheta[i] > ptheta[map_idx]) map_idx = 2'(i);
  end

  // Main sequence.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state         <= P_IDLE;
      iter          <= '0;
      dip           <= '0;
      have_wave     <= 1'b0;
      retx_cnt      <= '0;
      xpwe_en       <= 1'b0;
      tx_start      <= 1'b0;
      rx_en         <= 1'b0;
      upd_en        <= 1'b0;
      frame_req     <= 1'b0;
      frame_new_len <= '0;
      PMOD1_0_LS    <= 1'b1;
      PMOD1_1_LS    <= 1'b1;
      PMOD1_2_LS    <= 1'b1;
      PMOD1_3_LS    <= 1'b1;
      for (int i = 0; i < N_HYP; i++) ptheta[i] <= Q_QUARTER;
      for (int i = 0; i < 5; i++) frame_new[i] <= '0;
      for (int n = 0; n < N_TAPS; n++) begin
        x_re[n] <= '0;
        x_im[n] <= '0;
      end
    end else begin
      tx_start  <= 1'b0;
      frame_req <= 1'b0;
      unique case (state)
        // 0: idle; periodic retransmission of the last waveform
        P_IDLE: begin
          dip <= {GPIO_DIP_SW4, GPIO_DIP_SW3, GPIO_DIP_SW2, GPIO_DIP_SW1};
          if (btn_pressed) begin
            retx_cnt <= '0;
            for (int i = 0; i < N_HYP; i++) ptheta[i] <= Q_QUARTER;
            state <= P_XPWE0;
          end else if (have_wave) begin
            if (retx_cnt == RETX_PERIOD - 1) begin
              retx_cnt <= '0;
              if (!tx_en) tx_start <= 1'b1;
            end else begin
              retx_cnt <= retx_cnt + 32'd1;
            end
          end
        end
        // 1: first waveform with ptheta = 1/4
        P_XPWE0: begin
          xpwe_en <= 1'b1;
          state   <= P_READ_XPWE0;
        end
        P_READ_XPWE0: begin
          if (xpwe_done) begin
            x_re    <= xs_re;
            x_im    <= xs_im;
            xpwe_en <= 1'b0;
            iter    <= '0;
            state   <= P_TX;
          end
        end
        // 2: transmit (the receiver is armed at the same time)
        P_TX: begin
          if (!tx_en) begin
            tx_start <= 1'b1;
            rx_en    <= 1'b1;
            state    <= P_RX;
          end
        end
        // 3: receive the target return
        P_RX: begin
          if (rx_done) begin
            rx_en <= 1'b0;
            state <= P_UPDATE;
          end
        end
        // 4..10: likelihoods and probability update
        P_UPDATE: begin
          upd_en <= 1'b1;
          state  <= P_READ_UPDATE;
        end
        P_READ_UPDATE: begin
          if (upd_done) begin
            ptheta        <= p_new;
            upd_en        <= 1'b0;
            frame_req     <= 1'b1;
            frame_new     <= '{p_new[0], p_new[1], p_new[2], p_new[3], 32'd0};
            frame_new_len <= 3'd4;
            state         <= P_XPWE;
          end
        end
        // 11: new waveform; next iteration
        P_XPWE: begin
          xpwe_en <= 1'b1;
          state   <= P_READ_XPWE;
        end
        P_READ_XPWE: begin
          if (xpwe_done) begin
            x_re    <= xs_re;
            x_im    <= xs_im;
            xpwe_en <= 1'b0;
            iter    <= iter + 3'd1;
            state   <= (iter == 3'(N_ITER - 1)) ? P_CLASSIFY : P_TX;
          end
        end
        // 12: decision to the LEDs, back to idle
        P_CLASSIFY: begin
          PMOD1_0_LS    <= (map_idx != 2'd0);
          PMOD1_1_LS    <= (map_idx != 2'd1);
          PMOD1_2_LS    <= (map_idx != 2'd2);
          PMOD1_3_LS    <= (map_idx != 2'd3);
          frame_req     <= 1'b1;
          frame_new     <= '{ptheta[0], ptheta[1], ptheta[2], ptheta[3],
                             {26'd0, map_idx, dip}};
          frame_new_len <= 3'd5;
          have_wave     <= 1'b1;
          retx_cnt      <= '0;
          state         <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign PMOD0_0_LS = spi_sck;
  assign PMOD0_1_LS = spi_mosi;
  assign PMOD0_2_LS = spi_ss_n;
  assign PMOD0_3_LS = (state != P_IDLE);
  assign PMOD0_4_LS = tx_en;
  assign PMOD0_5_LS = tx_ref;
  assign PMOD0_6_LS = rx_hit;
  assign PMOD0_7_LS = rx_read;

endmodule
