// tlc_fsm: prioritized highway / side-road traffic light state machine.
//
// Eight states, each lasting one timing interval (20 s by default):
//   A1 -> A2 -> A3 -> A4 -> B -> C1 -> C2 -> D -> A1   (no exception)
// i.e. 80 s of highway green, 20 s highway yellow, 40 s side-road green and
// 20 s side-road yellow.  Two exception requests bend the cycle, sh for the
// highway and sg for the side road (an emergency or priority vehicle):
//   A1, A2, A3 : sh=0, sg=1  -> B   (cut the highway green short)
//   A4         : sh=1, sg=0  -> A4  (hold highway green)
//   B          : sh=1, sg=0  -> A4  (back to highway green)
//   C1         : sh=1, sg=0  -> D   (cut the side-road green short)
//   C2         : sh=0, sg=1  -> C2  (hold side-road green)
//   D          : sh=1, sg=1  -> D   (hold), sh=0, sg=1 -> C2
// and every other input combination takes the normal arrow.  The state codes
// are fixed ({Qx,Qy,Qz}: A1=000 ... D=111) so the state port can be watched.
//
// The state advances only when the timer's expired level rises: expired is
// turned into a one-cycle pulse (step) here, so a level that stays high for a
// second cannot push the machine through several states.  start_timer is that
// pulse delayed by one cycle and restarts the timer and the 1 Hz divider for
// the new state; ex_reset (= step) clears the latched exceptions the step used.
// interval selects the timing parameter of the present state.
//
// A reprogram request (prog_pulse) produces param_we for exactly one cycle,
// the one-cycle "memory write" state; the lights keep cycling meanwhile.
//
// Reset (synchronous, active high) enters A1 and keeps start_timer high.
// Timing: state changes at the edge after expired rises; with the divider and
// timer of this controller a state lasts value*DIV + 3 clock cycles.
//
// The state table, the state codes, the exception behaviour and the
// level-to-pulse handling of expired follow the source design; where the
// source's gate equations and state diagram disagree, the diagram and text are
// followed.  Keeping the lights running during a parameter write is this
// design's choice.
module tlc_fsm
  import tlc_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          expired,
  input  tlc_ex_t       ex,
  input  logic          prog_pulse,
  output tlc_state_e    state,
  output tlc_interval_e interval,
  output logic          start_timer,
  output logic          ex_reset,
  output logic          param_we,
  output logic          step
);

  logic       expired_q;
  tlc_state_e next_state;

  assign step     = expired & ~expired_q;
  assign ex_reset = step;

  always_comb begin
    next_state = state;
    unique case (state)
      ST_A1: next_state = (!ex.sh &&  ex.sg) ? ST_B  : ST_A2;
      ST_A2: next_state = (!ex.sh &&  ex.sg) ? ST_B  : ST_A3;
      ST_A3: next_state = (!ex.sh &&  ex.sg) ? ST_B  : ST_A4;
      ST_A4: next_state = ( ex.sh && !ex.sg) ? ST_A4 : ST_B;
      ST_B:  next_state = ( ex.sh && !ex.sg) ? ST_A4 : ST_C1;
      ST_C1: next_state = ( ex.sh && !ex.sg) ? ST_D  : ST_C2;
      ST_C2: next_state = (!ex.sh &&  ex.sg) ? ST_C2 : ST_D;
      ST_D:  next_state = ( ex.sh &&  ex.sg) ? ST_D  :
                          (!ex.sh &&  ex.sg) ? ST_C2 : ST_A1;
      default: next_state = ST_A1;
    endcase
  end

  always_comb begin
    unique case (state)
      ST_A1, ST_A2, ST_A3, ST_A4: interval = IV_HWY_GREEN;
      ST_B:                       interval = IV_HWY_YELLOW;
      ST_C1, ST_C2:               interval = IV_SRD_GREEN;
      default:                    interval = IV_SRD_YELLOW;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= ST_A1;
      expired_q   <= 1'b0;
      start_timer <= 1'b1;
      param_we    <= 1'b0;
    end else begin
      expired_q   <= expired;
      start_timer <= step;
      param_we    <= prog_pulse;
      if (step) state <= next_state;
    end
  end

  // The parameter write is never longer than one cycle.
  assert property (@(posedge clk) disable iff (rst) param_we |=> !param_we);
  // A step always restarts the timer in the following cycle.
  assert property (@(posedge clk) disable iff (rst) step |=> start_timer);

endmodule
