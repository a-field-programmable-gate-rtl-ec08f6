// random_number_generator: free-running random sources of the Monte Carlo
// model.
//
// random is a 2-bit target selection from a 3-bit LFSR. Each clock the next
// 3-bit state is {s[2], s[2]^s[0], s[1]} (bit 2 kept, bit 1 from an XOR of
// bits 2 and 0, bit 0 taken from bit 1), and random = {s[2]^s[0],
// n[2]^n[0]} where n is that next state. noise and noise_j are independent
// pseudo-Gaussian samples for the in-phase and quadrature channels, each from
// a gaussian_noise block of ten 19-bit LFSRs (twenty in all). All outputs are
// registered and change every clock. The structure follows the document; the
// seed values are this design's.
//
// Note that with these feedback taps the 3-bit register runs in short cycles:
// from the default seed 3'b100 it visits 100, 110, 111, 101 and random
// repeats 3, 2, 0, 1, so every target is drawn equally often but in a fixed
// order; seeds 001 and 010 alternate and give 2 and 1 only; 000 and 011 lock.
module random_number_generator
  import crr_pkg::*;
#(
  parameter logic [2:0] SEED3 = 3'b100
) (
  input  logic       clk,
  input  logic       reset_n,
  output logic [1:0] random,
  output q16_t       noise,
  output q16_t       noise_j
);

  logic [2:0] s3, n3;
  assign n3 = {s3[2], s3[2] ^ s3[0], s3[1]};

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      s3     <= SEED3;
      random <= '0;
    end else begin
      s3     <= n3;
      random <= {n3[1], n3[2] ^ n3[0]};
    end
  end

  gaussian_noise #(.SEED_BASE(19'h2B4C1)) u_noise_i (
    .clk (clk), .reset_n (reset_n), .noise (noise)
  );

  gaussian_noise #(.SEED_BASE(19'h51A37)) u_noise_q (
    .clk (clk), .reset_n (reset_n), .noise (noise_j)
  );

endmodule
