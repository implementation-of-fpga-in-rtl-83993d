// tb_pulse_divider: checks the enable generator with a 16-step (four-bit)
// divider and a 5-step divider.  After reset or clear the first tick must come
// exactly DIV cycles later, and then one tick every DIV cycles, one cycle wide.
module tb_pulse_divider;
  logic clk = 0, rst, clear;
  logic tick16, tick5;
  int checks = 0, failures = 0;

  pulse_divider #(.DIV(16)) dut16 (.clk, .rst, .clear, .tick(tick16));
  pulse_divider #(.DIV(5))  dut5  (.clk, .rst, .clear, .tick(tick5));

  always #5 clk = ~clk;

  // cycle counter since the last clear/reset was sampled
  int since;
  int clears = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (since=%0d)", what, $time, since); end
  endtask

  initial begin
    rst = 1; clear = 0;
    @(posedge clk); @(negedge clk);
    rst = 0; since = 0;
    for (int i = 0; i < 3000; i++) begin
      clear = ($urandom_range(0, 99) == 0);
      @(posedge clk);
      @(negedge clk);
      if (clear) begin since = 0; clears++; end
      else since++;
      // tick is registered: high in the cycle after the count passes zero
      check(tick16 == (!clear && since > 0 && since % 16 == 0), "tick16");
      check(tick5  == (!clear && since > 0 && since % 5 == 0),  "tick5");
    end
    check(clears > 5, "clear exercised");
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
