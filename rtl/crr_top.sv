// crr_top: the two PWE target recognition designs side by side.
//
// u_processor is the radar processor of the FPGA-in-the-loop experiment: it
// drives the RF transmitter link, reads the receiver link and reports its
// target decision on LEDs and an SPI test port (see crr_processor). u_mc is
// the all-digital Monte Carlo model that measured the classification rate
// against transmit energy with simulated target returns and noise (see
// target_recognition). They share only the clock; the Monte Carlo model has
// its own reset (mc_reset_n) and its own result ports, prefixed mc_.
//
// MC_N_TRIALS is the number of Monte Carlo trials per energy level; its
// default is the document's 1000. All other sizes are the defaults of the two
// units. Both units run from the single 125 MHz clock.
module crr_top
  import crr_pkg::*;
#(
  parameter int MC_N_TRIALS = 1000
) (
  input  logic         clk,
  // Radar processor
  input  logic         GPIO_DIP_SW1,
  input  logic         GPIO_DIP_SW2,
  input  logic         GPIO_DIP_SW3,
  input  logic         GPIO_DIP_SW4,
  input  logic         GPIO_SW_C,
  input  logic         RESET,
  input  logic [239:0] RX_DATA,
  output logic [239:0] TX_XPWE,
  output logic [7:0]   PMOD0,
  output logic [3:0]   PMOD1,
  // Monte Carlo model
  input  logic         mc_reset_n,
  input  q16_t         mc_ks_start,
  output logic [3:0]   mc_ks,
  output q16_t         mc_kms,
  output logic [1:0]   mc_target_sel,
  output logic [1:0]   mc_decision,
  output q16_t         mc_err_count,
  output q16_t         mc_pc,
  output q16_t         mc_ptheta [N_HYP],
  output logic         mc_trial_done,
  output logic         mc_level_done,
  output logic         mc_done
);

  crr_processor u_processor (
    .clk          (clk),
    .GPIO_DIP_SW1 (GPIO_DIP_SW1),
    .GPIO_DIP_SW2 (GPIO_DIP_SW2),
    .GPIO_DIP_SW3 (GPIO_DIP_SW3),
    .GPIO_DIP_SW4 (GPIO_DIP_SW4),
    .GPIO_SW_C    (GPIO_SW_C),
    .RESET        (RESET),
    .RX_DATA      (RX_DATA),
    .TX_XPWE      (TX_XPWE),
    .PMOD0_0_LS   (PMOD0[0]),
    .PMOD0_1_LS   (PMOD0[1]),
    .PMOD0_2_LS   (PMOD0[2]),
    .PMOD0_3_LS   (PMOD0[3]),
    .PMOD0_4_LS   (PMOD0[4]),
    .PMOD0_5_LS   (PMOD0[5]),
    .PMOD0_6_LS   (PMOD0[6]),
    .PMOD0_7_LS   (PMOD0[7]),
    .PMOD1_0_LS   (PMOD1[0]),
    .PMOD1_1_LS   (PMOD1[1]),
    .PMOD1_2_LS   (PMOD1[2]),
    .PMOD1_3_LS   (PMOD1[3])
  );

  target_recognition #(.N_TRIALS(MC_N_TRIALS)) u_mc (
    .clk        (clk),
    .reset_n    (mc_reset_n),
    .ks_start   (mc_ks_start),
    .ks         (mc_ks),
    .kms        (mc_kms),
    .target_sel (mc_target_sel),
    .decision   (mc_decision),
    .err_count  (mc_err_count),
    .pc         (mc_pc),
    .ptheta     (mc_ptheta),
    .trial_done (mc_trial_done),
    .level_done (mc_level_done),
    .mc_done    (mc_done)
  );

endmodule
