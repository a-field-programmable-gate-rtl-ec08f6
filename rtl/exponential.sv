// exponential: e^x for a Q15.16 input by table look-up.
//
// The input is rounded to the nearest multiple of 1/64 and used to index a
// read-only table: 709 entries for the negative arguments -709/64 .. -1/64 and
// 665 for 1/64 .. 665/64 (plus e^0), the table sizes the document gives.
// Arguments at or above 10.390625 return e^10.390625 = 32553.006 and
// arguments at or below -11.078125 return e^-11.078125 = 1.5447e-5, the
// document's clamps, which keep every result inside Q15.16.
//
// The document filled its tables offline. Here each entry is computed at
// elaboration by exp_entry(), exactly in fixed point: e^(k/64) is built by
// square-and-multiply from e^(1/64) held with 40 fractional bits, then rounded
// to Q15.16. The rounding of the input to 1/64 steps is this design's choice.
//
// Interface: enable/complete handshake. exponential_input is taken when
// exponential_en is seen high in idle; exponential_result and
// exponential_complete follow on the next edge and are held until
// exponential_en falls.
module exponential
  import crr_pkg::*;
(
  input  logic clk,
  input  logic reset_n,
  input  logic exponential_en,
  input  q16_t exponential_input,
  output q16_t exponential_result,
  output logic exponential_complete
);

  localparam int N_NEG  = 709;              // negative-argument entries
  localparam int N_POS  = 665;              // positive-argument entries
  localparam int N_ROM  = N_NEG + N_POS + 1;
  localparam int FRAC_W = 40;

  // e^(+1/64) and e^(-1/64) with 40 fractional bits.
  localparam logic [127:0] E_UP = 128'd1116826416478;
  localparam logic [127:0] E_DN = 128'd1082465279991;

  // e^(k/64) in Q15.16 for -N_NEG <= k <= N_POS.
  function automatic q16_t exp_entry(input int k);
    logic [127:0] acc, base;
    int           mag;
    acc  = 128'd1 << FRAC_W;
    base = (k < 0) ? E_DN : E_UP;
    mag  = (k < 0) ? -k : k;
    for (int b = 0; b < 10; b++) begin
      if (mag[b]) acc = (acc * base) >> FRAC_W;
      base = (base * base) >> FRAC_W;
    end
    acc = (acc + (128'd1 << (FRAC_W - 17))) >> (FRAC_W - 16);
    return q16_t'(acc[31:0]);
  endfunction

  q16_t rom [N_ROM];
  for (genvar i = 0; i < N_ROM; i++) begin : g_rom
    assign rom[i] = exp_entry(i - N_NEG);
  end

  // Rounded table index, clamped to the table.
  logic signed [31:0] idx_raw;
  logic        [10:0] rom_addr;
  assign idx_raw = (exponential_input + 32'sd512) >>> 10;
  always_comb begin
    if (idx_raw >= N_POS)       rom_addr = 11'(N_NEG + N_POS);
    else if (idx_raw <= -N_NEG) rom_addr = 11'd0;
    else                        rom_addr = 11'(idx_raw + N_NEG);
  end

  hs_state_e state;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state                <= HS_IDLE;
      exponential_result   <= '0;
      exponential_complete <= 1'b0;
    end else begin
      unique case (state)
        HS_IDLE: begin
          exponential_complete <= 1'b0;
          if (exponential_en) begin
            exponential_result   <= rom[rom_addr];
            exponential_complete <= 1'b1;
            state                <= HS_DONE;
          end
        end
        HS_DONE: begin
          if (!exponential_en) begin
            exponential_complete <= 1'b0;
            state                <= HS_IDLE;
          end
        end
        default: state <= HS_IDLE;
      endcase
    end
  end

endmodule
