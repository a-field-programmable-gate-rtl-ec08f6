// spi_tx: write-only three-wire SPI transmitter for 32-bit words.
//
// On start (while idle) the 32-bit word is latched, ss_n goes low and the
// word is shifted out on mosi MSB first, one bit per sck period. sck idles
// low; mosi changes while sck is low and is stable while sck is high, so a
// receiver samples on the rising edge. One sck period is SCK_DIV clocks (low
// half then high half); the default 512 gives 244 kHz from a 125 MHz clock,
// the document's rate. After the 32nd bit ss_n returns high and busy falls.
// The word size, the three wires and the rate are the document's; the clock
// polarity, bit order and framing are this design's.
//
// Timing: busy falls 32*SCK_DIV clocks after the edge that accepted start.
module spi_tx #(
  parameter int unsigned SCK_DIV = 512
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        start,
  input  logic [31:0] data,
  output logic        busy,
  output logic        sck,
  output logic        mosi,
  output logic        ss_n
);

  localparam int DIV_W = $clog2(SCK_DIV);

  logic [31:0]      shreg;
  logic [5:0]       bits_left;
  logic [DIV_W-1:0] div_cnt;

  assign mosi = shreg[31];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      shreg     <= '0;
      bits_left <= '0;
      div_cnt   <= '0;
      busy      <= 1'b0;
      sck       <= 1'b0;
      ss_n      <= 1'b1;
    end else if (!busy) begin
      sck <= 1'b0;
      if (start) begin
        shreg     <= data;
        bits_left <= 6'd32;
        div_cnt   <= '0;
        busy      <= 1'b1;
        ss_n      <= 1'b0;
      end
    end else begin
      div_cnt <= div_cnt + 1'b1;
      if (div_cnt == DIV_W'(SCK_DIV / 2 - 1)) begin
        sck <= 1'b1;
      end else if (div_cnt == DIV_W'(SCK_DIV - 1)) begin
        sck       <= 1'b0;
        div_cnt   <= '0;
        shreg     <= {shreg[30:0], 1'b0};
        bits_left <= bits_left - 6'd1;
        if (bits_left == 6'd1) begin
          busy <= 1'b0;
          ss_n <= 1'b1;
        end
      end
    end
  end

endmodule
