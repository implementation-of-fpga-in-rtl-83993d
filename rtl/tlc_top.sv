// tlc_top: prioritized highway traffic light controller.
//
// A busy highway crosses a quieter side road.  The highway gets 80 s of green
// (four 20 s stages A1..A4), then 20 s yellow (B); the side road gets 40 s of
// green (C1, C2), then 20 s yellow (D).  Exception buttons for either road
// (emergency or priority vehicles) cut a green short or hold it; see tlc_fsm.
//
// Blocks and their wiring:
//   tlc_sync        synchronizes reset, sh, sg and reprogram, pulses reprogram
//   tlc_ex_reg      holds exception requests until the FSM's next step
//   pulse_divider   4 MHz -> 1 Hz enable, restarted by start_timer
//   tlc_time_params RAM of interval lengths, written by the switches
//   tlc_timer       counts the enable up to the selected interval length
//   tlc_fsm         the state machine
//   tlc_light_dec   state -> lamps
//   hex7seg         shows the parameter at the selector on two hex digits
// Everything runs on clk; slower timing is done with enables only.
//
// Interface: lights = {HR,HY,HG,CR,CY,CG}; state is the present state code
// for test equipment.  Timing: with the defaults each state lasts
// 20 * 4,000,000 + 3 clock cycles, 3 cycles of FSM/timer hand-over added to
// the 20 s.  reset_in must be held for at least four cycles.
//
// The block structure follows the source design's block diagram; the sensor
// input of that diagram is not used by its state machine and is left out.
module tlc_top
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 4_000_000,
  parameter int unsigned TIME_W = 5
) (
  input  logic              clk,
  input  logic              reset_in,
  input  logic              sh_in,
  input  logic              sg_in,
  input  logic              prog_in,
  input  logic [1:0]        param_sel,
  input  logic [TIME_W-1:0] param_value,
  output tlc_lights_t       lights,
  output tlc_state_e        state,
  output logic [6:0]        seg_lo,
  output logic [6:0]        seg_hi
);

  logic              rst, prog_pulse, tick, start_timer, expired;
  logic              ex_reset, param_we;
  tlc_ex_t           ex_sync, ex;
  tlc_interval_e     interval;
  logic [TIME_W-1:0] value, disp_value;

  tlc_sync u_sync (
    .clk, .reset_in, .sh_in, .sg_in, .prog_in,
    .reset_sync(rst), .ex_sync, .prog_pulse
  );

  tlc_ex_reg u_ex (
    .clk, .rst, .ex_in(ex_sync), .ex_reset, .ex
  );

  pulse_divider #(.DIV(CLK_HZ)) u_div (
    .clk, .rst, .clear(start_timer), .tick
  );

  tlc_time_params #(.TIME_W(TIME_W)) u_params (
    .clk, .rst, .we(param_we), .wsel(param_sel), .wdata(param_value),
    .interval, .value, .disp_value
  );

  tlc_timer #(.TIME_W(TIME_W)) u_timer (
    .clk, .rst, .start(start_timer), .tick, .value, .expired
  );

  tlc_fsm u_fsm (
    .clk, .rst, .expired, .ex, .prog_pulse,
    .state, .interval, .start_timer, .ex_reset, .param_we, .step()
  );

  tlc_light_dec u_dec (
    .state, .lights
  );

  hex7seg #(.TIME_W(TIME_W)) u_hex (
    .value(disp_value), .seg_lo, .seg_hi
  );

endmodule
