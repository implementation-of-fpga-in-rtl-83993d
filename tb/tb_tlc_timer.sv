// tb_tlc_timer: checks the interval timer.  Ticks arrive every 7 cycles; for
// values 0..31 the timer is started and expired must rise in the cycle after
// the value-th tick (the first tick for value 0), stay high until the next
// tick, and the count must then restart by itself for the next interval.
module tb_tlc_timer;
  localparam int TW = 5;
  localparam int TP = 7;    // cycles between ticks
  logic clk = 0, rst, start, tick;
  logic [TW-1:0] value;
  logic expired;
  int checks = 0, failures = 0;

  tlc_timer #(.TIME_W(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t value=%0d", what, $time, value); end
  endtask

  int ticks_seen;
  initial begin
    rst = 1; start = 0; tick = 0; value = 0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int v = 0; v < 32; v++) begin
      value = TW'(v);
      start = 1; @(negedge clk); start = 0;
      check(!expired, "start clears expired");
      // two consecutive intervals without a new start
      for (int rep = 0; rep < 2; rep++) begin
        int need;
        need = (v == 0) ? 1 : v;
        for (int t = 1; t <= need; t++) begin
          repeat (TP - 1) begin @(negedge clk); check(!expired || (t == 1 && rep == 1), "no early expiry"); end
          tick = 1; @(negedge clk); tick = 0;
          if (t == need) check(expired, "expired after value ticks");
          else           check(!expired, "not expired before value ticks");
        end
        // stays high until the next tick
        repeat (TP - 1) begin @(negedge clk); check(expired, "expired is a level"); end
        if (rep == 1) break;
        if (need == 1) begin
          // the next tick itself expires again
          tick = 1; @(negedge clk); tick = 0;
          check(expired, "value 1 expires each tick");
          break;
        end
      end
    end
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
