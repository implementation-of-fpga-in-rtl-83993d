// tlc_timer: interval timer of the traffic light controller.
//
// Counts 1 Hz enable pulses (tick).  When the count reaches value, the count
// returns to zero by itself and expired goes high; expired stays high until
// the next tick or a start, i.e. it is a level about one second long, and the
// FSM makes a pulse of it.  start (the FSM's start_timer) clears the count and
// expired, so every state gets a fresh, whole interval.  A value of 0 behaves
// as 1.
//
// Interface: value in seconds, TIME_W bits; all signals synchronous to clk.
// Timing: expired rises in the cycle after the value-th tick counted since the
// last start.
//
// The self-resetting count-up and the level expired follow the source design;
// the start input follows its block diagram.
module tlc_timer #(
  parameter int unsigned TIME_W = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              tick,
  input  logic [TIME_W-1:0] value,
  output logic              expired
);

  logic [TIME_W-1:0] count;
  logic [TIME_W:0]   next_count;

  assign next_count = {1'b0, count} + 1'b1;

  always_ff @(posedge clk) begin
    if (rst || start) begin
      count   <= '0;
      expired <= 1'b0;
    end else if (tick) begin
      if (next_count >= {1'b0, value}) begin
        count   <= '0;
        expired <= 1'b1;
      end else begin
        count   <= next_count[TIME_W-1:0];
        expired <= 1'b0;
      end
    end
  end

endmodule
