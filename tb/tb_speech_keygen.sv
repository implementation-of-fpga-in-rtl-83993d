// tb_speech_keygen: checks the key-space generator.  A reference LFSR in
// integer arithmetic (next bit = parity of key AND taps mask) predicts every
// key; the testbench also checks that the NUM_KEYS keys of one key space are
// all different, that the key space repeats exactly every NUM_KEYS advances,
// and that the key holds while advance is low.  Run with 30 keys (default)
// and with the 20-key space mentioned as an alternative.
module tb_speech_keygen;
  logic clk = 0, rst, advance;
  logic [13:0] key30, key20;
  logic [4:0]  idx30, idx20;
  int checks = 0, failures = 0;

  speech_keygen dut30 (.clk, .rst, .advance, .key(key30), .key_index(idx30));
  speech_keygen #(.NUM_KEYS(20)) dut20 (.clk, .rst, .advance, .key(key20), .key_index(idx20));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_key(int n);  // n-th key after the seed
    int k = 'h1ACE;
    for (int i = 0; i < n; i++) k = ((k << 1) | ($countones(k & 'h2015) & 1)) & 'h3FFF;
    return k;
  endfunction

  int seen [int];
  initial begin
    rst = 1; advance = 0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      check(int'(key30) == ref_key(n % 30), $sformatf("key30 #%0d", n));
      check(int'(idx30) == n % 30, "index30");
      check(int'(key20) == ref_key(n % 20), $sformatf("key20 #%0d", n));
      check(int'(idx20) == n % 20, "index20");
      if (n < 30) begin
        check(!seen.exists(int'(key30)), "30 distinct keys");
        seen[int'(key30)] = 1;
      end
      // random idle cycles between advances
      repeat ($urandom_range(0, 3)) begin
        logic [13:0] hold;
        hold = key30;
        @(negedge clk);
        check(key30 == hold, "key holds without advance");
      end
      advance = 1; @(negedge clk); advance = 0;
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
