// gaussian_noise: pseudo-Gaussian noise source built on the central limit
// theorem.
//
// N_LFSR 19-bit LFSRs, each with its own seed, run every clock. Each LFSR word
// is read as a Q15.16 number, so it is roughly uniform on [0, 8). The words
// are summed, scaled by 1/(10*sqrt(2)) and the mean of that scaled sum, 2.828
// (40/(10*sqrt(2)), which the document rounds to "about 2.8"), is subtracted,
// giving a zero-mean sample with a standard deviation of about 0.52. The ten
// generators, the scaling and the mean subtraction are the document's; the
// seeds (derived from SEED_BASE) and the output register are this design's.
//
// noise is registered and changes every clock, one cycle after the LFSRs.
module gaussian_noise
  import crr_pkg::*;
#(
  parameter int          N_LFSR    = 10,
  parameter logic [18:0] SEED_BASE = 19'h2B4C1
) (
  input  logic clk,
  input  logic reset_n,
  output q16_t noise
);

  localparam q16_t SCALE = 32'sd4634;     // 1/(10*sqrt(2)) in Q15.16
  localparam q16_t MEAN  = 32'sd185364;   // 40/(10*sqrt(2)) in Q15.16

  logic [18:0] word [N_LFSR];

  for (genvar i = 0; i < N_LFSR; i++) begin : g_lfsr
    lfsr19 #(.SEED(SEED_BASE ^ 19'((i + 1) * 40503))) u_lfsr (
      .clk     (clk),
      .reset_n (reset_n),
      .value   (word[i])
    );
  end

  q16_t sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < N_LFSR; i++) sum += q16_t'({13'd0, word[i]});
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) noise <= '0;
    else          noise <= qmul(sum, SCALE) - MEAN;
  end

endmodule
