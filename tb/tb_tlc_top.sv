// tb_tlc_top: end-to-end test of the traffic light controller at a 10 Hz
// "system clock" (10 clocks per second), so a 20 s state lasts 203 clocks.
//
// At the start of every state the testbench may send a short exception
// request on either or both roads (a few clocks long, well before the state
// ends).  The controller must latch it and take the transition the state
// diagram gives; the reference is the condition table in ref_next.  Every
// state's duration must be value*10 + 3 clocks, and the lamps must match the
// output table in every clock.  Partway through, the operator reprograms the
// highway-yellow and side-green lengths; the display must show the value at
// the selector in hex, and later states must use the new lengths.  Steps are
// observed on the FSM's internal step pulse, since a hold step leaves the
// state code unchanged.
module tb_tlc_top;
  import tlc_pkg::*;

  localparam int DIV = 10;
  logic clk = 0, reset_in, sh_in, sg_in, prog_in;
  logic [1:0] param_sel;
  logic [4:0] param_value;
  tlc_lights_t lights;
  tlc_state_e state;
  logic [6:0] seg_lo, seg_hi;
  int checks = 0, failures = 0;

  tlc_top #(.CLK_HZ(DIV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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

  function automatic logic [5:0] ref_lights(tlc_state_e s);
    case (s)
      ST_B:         return 6'b010100;
      ST_C1, ST_C2: return 6'b100001;
      ST_D:         return 6'b100010;
      default:      return 6'b001100;
    endcase
  endfunction

  function automatic int ref_iv(tlc_state_e s);
    case (s)
      ST_B: return 1; ST_C1, ST_C2: return 2; ST_D: return 3; default: return 0;
    endcase
  endfunction

  int len [4] = '{20, 20, 20, 20};
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (!reset_in) begin
    checks++;
    if (lights != ref_lights(state)) begin failures++; $display("FAIL lamps %b in %s", lights, state.name()); end
  end

  int steps = 0, exceptional = 0, holds = 0, full_cycles = 0, writes = 0;
  initial begin
    tlc_state_e cur, want;
    int t0, dur, wrote_in_state;
    logic sh, sg;
    reset_in = 1; sh_in = 0; sg_in = 0; prog_in = 0; param_sel = 0; param_value = 0;
    repeat (6) @(negedge clk);
    reset_in = 0;
    repeat (3) @(negedge clk);
    check(state == ST_A1, "starts in A1");
    cur = state; t0 = cyc; wrote_in_state = 0;
    while (steps < 120) begin
      // request phase: a short pulse early in the state
      sh = 0; sg = 0;
      if (steps >= 9 && $urandom_range(0, 2) != 0) begin
        sh = 1'($urandom_range(0, 1)); sg = 1'($urandom_range(0, 1));
      end
      repeat (20) @(negedge clk);
      sh_in = sh; sg_in = sg;
      repeat (4) @(negedge clk);
      sh_in = 0; sg_in = 0;
      // reprogram once, in the 30th state: B := 5 s, side green := 12 s
      if (steps == 30) begin
        param_sel = 2'd1; param_value = 5'd5;
        @(negedge clk); prog_in = 1; repeat (6) @(negedge clk); prog_in = 0;
        repeat (4) @(negedge clk);
        check(seg_lo == 7'b1101101 && seg_hi == 7'b0111111, "display shows 05");
        param_sel = 2'd2; param_value = 5'd12;
        @(negedge clk); prog_in = 1; repeat (2) @(negedge clk); prog_in = 0;
        repeat (4) @(negedge clk);
        check(seg_lo == 7'b0111001 && seg_hi == 7'b0111111, "display shows 0C (12)");
        len[1] = 5; len[2] = 12; writes += 2; wrote_in_state = 1;
      end
      // wait for the step (a hold keeps the state code, so watch the FSM's step)
      while (!dut.u_fsm.step) @(negedge clk);
      @(negedge clk);
      dur = cyc - t0;
      want = ref_next(cur, sh, sg);
      check(state == want, $sformatf("step %0d: %s sh=%0d sg=%0d -> %s, want %s",
                                     steps, cur.name(), sh, sg, state.name(), want.name()));
      if (!wrote_in_state)
        check(dur == len[ref_iv(cur)] * DIV + 3 || steps == 0,
              $sformatf("duration of %s: %0d", cur.name(), dur));
      if (want != ref_next(cur, 0, 0)) exceptional++;
      if (want == cur) holds++;
      if (cur == ST_D && state == ST_A1) full_cycles++;
      steps++;
      cur = state; t0 = cyc; wrote_in_state = 0;
    end
    check(exceptional > 10, "exception transitions taken");
    check(holds > 2, "hold transitions taken");
    check(full_cycles > 2, "full cycles completed");
    $display("steps=%0d exceptional=%0d holds=%0d cycles=%0d writes=%0d", steps, exceptional, holds, full_cycles, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
