// tb_tlc_ex_reg: checks the exception request register against a one-line
// model: a bit is set by its request, kept until ex_reset, and a request
// present in the clearing cycle wins over the clear.
module tb_tlc_ex_reg;
  import tlc_pkg::*;

  logic clk = 0, rst, ex_reset;
  tlc_ex_t ex_in, ex;
  logic [1:0] model;
  int checks = 0, failures = 0;
  int set_while_clear = 0;

  tlc_ex_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst = 1; ex_in = '0; ex_reset = 0;
    @(posedge clk); @(negedge clk);
    rst = 0; model = 2'b00;
    checks++; if (ex != 2'b00) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 3000; i++) begin
      ex_in    = ($urandom_range(0, 3) == 0) ? 2'($urandom_range(0, 3)) : 2'b00;
      ex_reset = ($urandom_range(0, 5) == 0);
      if (ex_reset && ex_in != 0) set_while_clear++;
      @(posedge clk);
      if (ex_reset) model = ex_in;
      else          model = model | ex_in;
      @(negedge clk);
      checks++;
      if (ex != model) begin
        failures++;
        $display("FAIL ex=%b model=%b", ex, model);
      end
    end
    checks++; if (set_while_clear == 0) begin failures++; $display("FAIL no set-during-clear case"); end
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
