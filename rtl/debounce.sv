// debounce: push-button conditioner.
//
// The asynchronous button input passes a two-flop synchronizer; the
// debounced level follows it only after the synchronized input has held a
// new value for STABLE_CYCLES consecutive clocks, so contact bounce shorter
// than that is ignored. pressed is a one-clock pulse on each debounced
// press (rising edge of the level). The document only says that a debouncing
// algorithm captures the button; the synchronizer, the counter method and
// the 10 ms default (1 250 000 clocks at 125 MHz) are this design's.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 1_250_000
) (
  input  logic clk,
  input  logic reset_n,
  input  logic button,
  output logic level,
  output logic pressed
);

  localparam int CNT_W = $clog2(STABLE_CYCLES + 1);

  logic [1:0]       sync;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      sync    <= '0;
      count   <= '0;
      level   <= 1'b0;
      pressed <= 1'b0;
    end else begin
      sync    <= {sync[0], button};
      pressed <= 1'b0;
      if (sync[1] == level) begin
        count <= '0;
      end else if (count == CNT_W'(STABLE_CYCLES - 1)) begin
        count   <= '0;
        level   <= sync[1];
        pressed <= sync[1];
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
