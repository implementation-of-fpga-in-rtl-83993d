// tb_speech_unit: checks one speech cipher unit and an encrypt/decrypt pair.
// Clock and sample rate are scaled to 1 kHz / 100 Hz (10 clocks per sample).
// The transmitter's DAC word must equal (sample XOR key)[13:2], with the key
// from a reference LFSR, and appear one clock after each sample strobe, which
// must come every 10 clocks.  The receiver gets the transmitter's 12-bit word
// back as the top bits of its 14-bit ADC (the two LSBs are channel noise) and
// is released from reset one sample later; its output must equal the original
// sample without its two LSBs.
module tb_speech_unit;
  logic clk = 0, rst_tx, rst_rx;
  logic [13:0] adc_tx, adc_rx;
  logic samp_tx, samp_rx, val_tx, val_rx;
  logic [11:0] dac_tx, dac_rx;
  logic [4:0] kidx_tx, kidx_rx;
  int checks = 0, failures = 0;

  speech_unit #(.CLK_HZ(1000), .SAMPLE_HZ(100)) tx (
    .clk, .rst(rst_tx), .adc_data(adc_tx), .adc_sample(samp_tx),
    .dac_data(dac_tx), .dac_valid(val_tx), .key_index(kidx_tx));
  speech_unit #(.CLK_HZ(1000), .SAMPLE_HZ(100)) rx (
    .clk, .rst(rst_rx), .adc_data(adc_rx), .adc_sample(samp_rx),
    .dac_data(dac_rx), .dac_valid(val_rx), .key_index(kidx_rx));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_key(int n);
    int k = 'h1ACE;
    for (int i = 0; i < n; i++) k = ((k << 1) | ($countones(k & 'h2015) & 1)) & 'h3FFF;
    return k;
  endfunction

  int n_tx = 0, n_rx = 0, last_samp = -1, cyc = 0;
  int sent [$];
  logic [13:0] cur_sample;

  // speech-like test signal: a sawtooth plus noise, new value every cycle
  always @(negedge clk) begin
    cyc++;
    adc_tx = 14'((cyc * 37 + $urandom_range(0, 15)) & 'h3FFF);
    // channel: receiver ADC sees the transmitter DAC word in its top 12 bits
    adc_rx = {dac_tx, 2'($urandom_range(0, 3))};
  end

  always @(posedge clk) begin
    if (!rst_tx && samp_tx) begin
      if (last_samp >= 0 && (cyc - last_samp) != 10) begin
        failures++; $display("FAIL sample period %0d", cyc - last_samp);
      end
      checks++;
      last_samp = cyc;
      cur_sample = adc_tx;
      sent.push_back(int'(adc_tx));
      #1;
      checks++;
      if (!val_tx || int'(dac_tx) != ((int'(cur_sample) ^ ref_key(n_tx % 30)) >> 2)) begin
        failures++;
        $display("FAIL encrypt #%0d: dac=%h sample=%h", n_tx, dac_tx, cur_sample);
      end
      n_tx++;
    end
  end

  always @(posedge clk) begin
    if (!rst_rx && samp_rx) begin
      #1;
      // rx sample n decrypts tx sample n (tx output of sample n is on the line
      // during rx's n-th strobe)
      checks++;
      if (!val_rx || int'(dac_rx) != (sent[n_rx] >> 2)) begin
        failures++;
        $display("FAIL decrypt #%0d: got %h want %h", n_rx, dac_rx, sent[n_rx] >> 2);
      end
      n_rx++;
    end
  end

  initial begin
    rst_tx = 1; rst_rx = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_tx = 0;
    repeat (10) @(negedge clk);
    rst_rx = 0;
    wait (n_rx >= 100);
    check(n_tx >= 100, "enough samples");
    check(n_tx >= 31, "key space wrapped");
    // encrypted stream must differ from the plain one for most samples
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
