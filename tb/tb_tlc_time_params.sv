// tb_tlc_time_params: checks the timing-parameter RAM.  After reset every
// word holds the protocol's 20 s; random one-cycle writes are then mirrored in
// a testbench array and both read ports are compared with it every cycle.
module tb_tlc_time_params;
  import tlc_pkg::*;

  localparam int TW = 5;
  logic clk = 0, rst, we;
  logic [1:0] wsel;
  logic [TW-1:0] wdata, value, disp_value;
  tlc_interval_e interval;
  logic [TW-1:0] model [4];
  int checks = 0, failures = 0;

  tlc_time_params #(.TIME_W(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst = 1; we = 0; wsel = 0; wdata = 0; interval = IV_HWY_GREEN;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4; i++) model[i] = 5'd20;
    for (int i = 0; i < 4; i++) begin
      interval = tlc_interval_e'(i); wsel = 2'(i); #1;
      check(value == 5'd20 && disp_value == 5'd20, "reset default 20 s");
    end
    for (int i = 0; i < 2000; i++) begin
      we       = ($urandom_range(0, 3) == 0);
      wsel     = 2'($urandom_range(0, 3));
      wdata    = TW'($urandom_range(0, 31));
      interval = tlc_interval_e'($urandom_range(0, 3));
      #1;
      check(value == model[interval], "FSM read port");
      check(disp_value == model[wsel], "display read port");
      @(posedge clk);
      if (we) model[wsel] = wdata;
      @(negedge clk);
    end
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
