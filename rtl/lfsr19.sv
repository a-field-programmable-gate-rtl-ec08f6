// lfsr19: 19-bit linear-feedback shift register, one step per clock.
//
// Bits 0..17 move up to bits 1..18 and bit 0 receives bit 18 XOR bit 16, as
// in the document's 19-bit generator. The register loads SEED on reset; a
// seed of zero would lock the register at zero and is replaced by one. The
// current register value is the output, read as an unsigned number.
module lfsr19 #(
  parameter logic [18:0] SEED = 19'h1
) (
  input  logic        clk,
  input  logic        reset_n,
  output logic [18:0] value
);

  localparam logic [18:0] SAFE_SEED = (SEED == '0) ? 19'h1 : SEED;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) value <= SAFE_SEED;
    else          value <= {value[17:0], value[18] ^ value[16]};
  end

endmodule
