// tlc_ex_reg: exception request register of the traffic light controller.
//
// The controller only looks at the exception requests when it steps from one
// state to the next, which happens at most once every interval.  This
// register catches a synchronized request whenever it appears and holds it
// until the FSM clears it with ex_reset at the step that acted on it.  A
// request still present in the clearing cycle stays set, so an exception that
// is held keeps acting at every step.
//
// Interface: ex_in = synchronized {sh, sg}; ex = latched {sh, sg}.
// Timing: one cycle from ex_in to ex.  Synchronous reset clears both bits.
// Latching and FSM-driven clearing follow the source design; giving each road
// its own bit and letting set win over clear are this design's choices.
module tlc_ex_reg
  import tlc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  tlc_ex_t ex_in,
  input  logic    ex_reset,
  output tlc_ex_t ex
);

  always_ff @(posedge clk) begin
    if (rst) ex <= '0;
    else     ex <= (ex & ~{2{ex_reset}}) | ex_in;
  end

endmodule
