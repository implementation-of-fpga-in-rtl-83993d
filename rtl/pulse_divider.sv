// pulse_divider: clock-enable generator.
//
// A down-counter reloads to DIV-1 and emits a one-cycle pulse on tick every
// time it passes zero, so tick is high for one clock out of every DIV.  It is
// an enable for logic that runs on the system clock, not a derived clock.
// clear restarts the period: the first tick after a clear comes DIV cycles
// after the clear is sampled.
//
// Used twice: with DIV = 4,000,000 it makes the 1 Hz enable of the traffic
// light controller from its 4 MHz clock, and with DIV = 100 the 1 MHz sample
// tick of a speech unit from a 100 MHz clock.
//
// Interface: clk, rst (synchronous, active high), clear (synchronous restart),
// tick (registered, one cycle wide).  The count-down scheme, the pulse output
// and the restart by the timer's start signal follow the source design; the
// counter width is derived from DIV.
module pulse_divider #(
  parameter int unsigned DIV = 4_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] RELOAD = CW'(DIV - 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count <= RELOAD;
      tick  <= 1'b0;
    end else if (count == '0) begin
      count <= RELOAD;
      tick  <= 1'b1;
    end else begin
      count <= count - 1'b1;
      tick  <= 1'b0;
    end
  end

  initial begin
    assert (DIV >= 1) else $error("pulse_divider: DIV must be at least 1");
  end

endmodule
