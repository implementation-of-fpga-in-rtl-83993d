// tlc_time_params: timing-parameter RAM of the traffic light controller.
//
// Four words hold, in seconds, the length of each interval the controller can
// be in: highway green stage (states A1..A4), highway yellow (B), side-road
// green stage (C1, C2) and side-road yellow (D).  Reset loads the defaults of
// the protocol, 20 s each, which gives 80 s of highway green, 40 s of side
// road green and 20 s yellows.  An operator changes a word by setting the
// selector and value switches and pressing reprogram; the FSM then raises we
// for exactly one cycle.
//
// Two asynchronous read ports: value (addressed by the FSM's interval select,
// feeding the timer) and disp_value (addressed by the selector, feeding the
// hex display).  Writes take effect at the next clock edge.
//
// The RAM and its switch-driven write follow the source design.  The word
// width is 5 bits (the source's 4-bit bus cannot hold its own 20 s intervals),
// and the shared tristate data bus is replaced by two read ports.
module tlc_time_params
  import tlc_pkg::*;
#(
  parameter int unsigned TIME_W = 5,
  parameter int unsigned T_HG   = 20,
  parameter int unsigned T_HY   = 20,
  parameter int unsigned T_CG   = 20,
  parameter int unsigned T_CY   = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [1:0]        wsel,
  input  logic [TIME_W-1:0] wdata,
  input  tlc_interval_e     interval,
  output logic [TIME_W-1:0] value,
  output logic [TIME_W-1:0] disp_value
);

  logic [TIME_W-1:0] mem [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      mem[IV_HWY_GREEN]  <= TIME_W'(T_HG);
      mem[IV_HWY_YELLOW] <= TIME_W'(T_HY);
      mem[IV_SRD_GREEN]  <= TIME_W'(T_CG);
      mem[IV_SRD_YELLOW] <= TIME_W'(T_CY);
    end else if (we) begin
      mem[wsel] <= wdata;
    end
  end

  assign value      = mem[interval];
  assign disp_value = mem[wsel];

endmodule
