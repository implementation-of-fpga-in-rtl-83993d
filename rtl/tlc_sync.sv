// tlc_sync: input handler of the traffic light controller.
//
// Every asynchronous input (reset button, the two exception requests and the
// reprogram button) passes through its own chain of STAGES flip-flops before
// the rest of the controller sees it.  The reprogram button is further turned
// into a single-cycle pulse on its synchronized rising edge, so a long press
// causes exactly one parameter write.
//
// Interface: reset_sync is the active-high synchronous reset for the whole
// controller; ex_sync = {sh, sg}; prog_pulse is high for one cycle per press.
// Timing: STAGES cycles of latency on every output, STAGES+1 for prog_pulse.
// The flops have no reset of their own: they flush within STAGES+1 cycles,
// and reset_sync must be held longer than that after power-up (the reset
// button is expected to be held for many cycles).
//
// Synchronizing and pulse-shaping the inputs follows the source design; the
// chain depth is this design's choice.
module tlc_sync
  import tlc_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic    clk,
  input  logic    reset_in,
  input  logic    sh_in,
  input  logic    sg_in,
  input  logic    prog_in,
  output logic    reset_sync,
  output tlc_ex_t ex_sync,
  output logic    prog_pulse
);

  logic [STAGES-1:0] rst_q, sh_q, sg_q, prog_q;
  logic              prog_last;

  always_ff @(posedge clk) begin
    rst_q     <= {rst_q[STAGES-2:0],  reset_in};
    sh_q      <= {sh_q[STAGES-2:0],   sh_in};
    sg_q      <= {sg_q[STAGES-2:0],   sg_in};
    prog_q    <= {prog_q[STAGES-2:0], prog_in};
    prog_last <= prog_q[STAGES-1];
  end

  assign reset_sync = rst_q[STAGES-1];
  assign ex_sync    = '{sh: sh_q[STAGES-1], sg: sg_q[STAGES-1]};
  assign prog_pulse = prog_q[STAGES-1] & ~prog_last;

endmodule
