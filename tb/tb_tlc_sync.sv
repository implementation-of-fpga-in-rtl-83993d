// tb_tlc_sync: checks the input synchronizer.  Each asynchronous input must
// appear on its output exactly two clock edges later, and every press of the
// reprogram button, however long, must give exactly one one-cycle pulse.
// The expected outputs come from a shift-register model kept in the testbench.
module tb_tlc_sync;
  import tlc_pkg::*;

  logic clk = 0;
  logic reset_in, sh_in, sg_in, prog_in;
  logic reset_sync, prog_pulse;
  tlc_ex_t ex_sync;
  int checks = 0, failures = 0;
  int pulses = 0, presses = 0;

  tlc_sync dut (.*);

  always #5 clk = ~clk;

  // reference: input history sampled at each edge
  logic [3:0] hist [3];   // hist[k] = inputs sampled k+1 edges ago, {rst,sh,sg,prog}
  logic       prog_prev_ref;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    reset_in = 1; sh_in = 0; sg_in = 0; prog_in = 0;
    repeat (5) @(posedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // compare with what was applied two edges ago
      if (cyc >= 4) begin
        check(reset_sync == hist[1][3], "reset_sync delay");
        check(ex_sync.sh == hist[1][2], "sh delay");
        check(ex_sync.sg == hist[1][1], "sg delay");
        check(prog_pulse == (hist[1][0] & ~hist[2][0]), "prog pulse");
      end
      // new random inputs; prog presses last 1..20 cycles
      reset_in = ($urandom_range(0, 9) == 0);
      sh_in    = $urandom_range(0, 1);
      sg_in    = $urandom_range(0, 1);
      if (prog_in) prog_in = ($urandom_range(0, 7) != 0);
      else begin
        prog_in = ($urandom_range(0, 15) == 0);
        if (prog_in) presses++;
      end
    end
    // let the last press through
    prog_in = 0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    check(pulses == presses, "one pulse per press");
    check(presses > 20, "enough presses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (prog_pulse) pulses++;

  always @(posedge clk) begin
    hist[2] <= hist[1];
    hist[1] <= hist[0];
    hist[0] <= {reset_in, sh_in, sg_in, prog_in};
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
