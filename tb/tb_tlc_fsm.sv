// tb_tlc_fsm: checks the traffic light state machine.  From every state and
// for every exception combination it raises expired and compares the next
// state with the state diagram (kept here as a table of condition labels:
// "on this input go there, otherwise take the normal arrow").  It also checks
// that a long expired level causes a single step, that start_timer and
// ex_reset follow the step, the interval select of each state, and that a
// reprogram request gives exactly one cycle of param_we.
module tb_tlc_fsm;
  import tlc_pkg::*;

  logic clk = 0, rst, expired, prog_pulse;
  tlc_ex_t ex;
  tlc_state_e state;
  tlc_interval_e interval;
  logic start_timer, ex_reset, param_we, step;
  int checks = 0, failures = 0;
  int covered [8][4];

  tlc_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t state=%s", what, $time, state.name()); end
  endtask

  // Reference from the state diagram: normal successor and labelled branches.
  function automatic tlc_state_e ref_next(tlc_state_e s, logic sh, logic sg);
    tlc_state_e normal [8] = '{ST_A2, ST_A3, ST_A4, ST_B, ST_C1, ST_C2, ST_D, ST_A1};
    ref_next = normal[int'(s)];
    if (s inside {ST_A1, ST_A2, ST_A3} && sh == 0 && sg == 1) ref_next = ST_B;
    if (s == ST_A4 && sh == 1 && sg == 0) ref_next = ST_A4;
    if (s == ST_B  && sh == 1 && sg == 0) ref_next = ST_A4;
    if (s == ST_C1 && sh == 1 && sg == 0) ref_next = ST_D;
    if (s == ST_C2 && sh == 0 && sg == 1) ref_next = ST_C2;
    if (s == ST_D  && sh == 1 && sg == 1) ref_next = ST_D;
    if (s == ST_D  && sh == 0 && sg == 1) ref_next = ST_C2;
  endfunction

  function automatic tlc_interval_e ref_interval(tlc_state_e s);
    case (s)
      ST_B:         return IV_HWY_YELLOW;
      ST_C1, ST_C2: return IV_SRD_GREEN;
      ST_D:         return IV_SRD_YELLOW;
      default:      return IV_HWY_GREEN;
    endcase
  endfunction

  // Steer the machine into state s along normal arrows (no exceptions).
  task automatic step_once(logic sh, logic sg, int hold);
    ex = '{sh: sh, sg: sg};
    expired = 1;
    #1;
    check(step && ex_reset, "step pulse on rising expired");
    @(negedge clk);
    check(start_timer, "start_timer in the cycle after the step");
    check(!step, "single step per expired level");
    repeat (hold) begin @(negedge clk); check(!step && !start_timer, "no extra step while expired stays high"); end
    expired = 0; ex = '0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1; expired = 0; ex = '0; prog_pulse = 0;
    repeat (2) @(posedge clk); @(negedge clk);
    check(state == ST_A1, "reset enters A1");
    check(start_timer, "start_timer held in reset");
    rst = 0;
    @(negedge clk);
    for (int round = 0; round < 400; round++) begin
      tlc_state_e s_prev, want;
      logic sh, sg;
      sh = 1'($urandom_range(0, 1)); sg = 1'($urandom_range(0, 1));
      s_prev = state;
      check(interval == ref_interval(state), "interval select");
      want = ref_next(s_prev, sh, sg);
      covered[int'(s_prev)][{sh, sg}]++;
      step_once(sh, sg, $urandom_range(0, 5));
      check(state == want, $sformatf("transition %s sh=%0d sg=%0d", s_prev.name(), sh, sg));
      // occasionally a reprogram request
      if ($urandom_range(0, 7) == 0) begin
        prog_pulse = 1; @(negedge clk); prog_pulse = 0;
        check(param_we, "param_we follows prog");
        @(negedge clk);
        check(!param_we, "param_we one cycle");
      end
    end
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < 4; c++)
        check(covered[s][c] > 0, $sformatf("state %0d input %0d covered", s, c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
