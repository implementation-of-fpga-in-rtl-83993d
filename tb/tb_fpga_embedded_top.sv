// tb_fpga_embedded_top: end-to-end test of both designs in the top, at
// reduced clock rates (traffic controller: 10 clocks per second; speech link:
// 10 clocks per sample).
//
// Traffic light controller: at the start of every state the testbench sends a
// short exception request, chosen half of the time to be the condition that
// bends this state's arrow in the state diagram.  Each step is compared with
// the diagram (ref_next), each state's length with value*10 + 3 clocks, the
// lamps with the output table in every clock.  The operator reprograms two
// interval lengths midway and reads one back on the display.
//
// Speech link: the encrypting unit's DAC word goes through a channel model
// (12 bits in the top of the receiver's 14-bit ADC, random LSBs) into the
// decrypting unit, released from reset one sample later.  Every encrypted word
// is checked against (sample XOR key)[13:2] and every decrypted word against
// the original sample without its two LSBs.
//
// Every mechanism must happen at least once, else it counts as a failure:
// each of the seven exception branches, the latching of a short request, a
// normal full cycle, a parameter write and its effect on timing, the display,
// key-space wrap-around, and encryption / decryption.
module tb_fpga_embedded_top;
  import tlc_pkg::*;

  localparam int DIV = 10;
  // traffic controller side
  logic tclk = 0, reset_in, sh_in, sg_in, prog_in;
  logic [1:0] param_sel;
  logic [4:0] param_value;
  tlc_lights_t lights;
  tlc_state_e state;
  logic [6:0] seg_lo, seg_hi;
  // speech side
  logic sclk = 0, enc_rst, dec_rst;
  logic [13:0] enc_adc, dec_adc;
  logic enc_samp, dec_samp, enc_val, dec_val;
  logic [11:0] enc_dac, dec_dac;
  logic [4:0] enc_kidx, dec_kidx;

  int checks = 0, failures = 0;

  fpga_embedded_top #(.TLC_CLK_HZ(DIV), .SP_CLK_HZ(1000), .SAMPLE_HZ(100)) dut (
    .tlc_clk(tclk), .tlc_reset(reset_in), .tlc_sh(sh_in), .tlc_sg(sg_in), .tlc_prog(prog_in),
    .tlc_param_sel(param_sel), .tlc_param_value(param_value), .tlc_lights(lights),
    .tlc_state(state), .tlc_seg_lo(seg_lo), .tlc_seg_hi(seg_hi),
    .enc_clk(sclk), .enc_rst, .enc_adc_data(enc_adc), .enc_adc_sample(enc_samp),
    .enc_dac_data(enc_dac), .enc_dac_valid(enc_val), .enc_key_index(enc_kidx),
    .dec_clk(sclk), .dec_rst, .dec_adc_data(dec_adc), .dec_adc_sample(dec_samp),
    .dec_dac_data(dec_dac), .dec_dac_valid(dec_val), .dec_key_index(dec_kidx));

  always #5 tclk = ~tclk;
  always #3 sclk = ~sclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- reference models ----------------
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

  function automatic int ref_key(int n);
    int k = 'h1ACE;
    for (int i = 0; i < n; i++) k = ((k << 1) | ($countones(k & 'h2015) & 1)) & 'h3FFF;
    return k;
  endfunction

  // ---------------- mechanism counters ----------------
  // 0 A->B early end, 1 A4 hold, 2 B->A4, 3 C1->D, 4 C2 hold, 5 D hold, 6 D->C2
  int branch [7];
  int latched = 0, full_cycles = 0, writes = 0, retimed = 0, display_ok = 0;
  int key_wraps = 0, encrypted = 0, differs = 0, decrypted = 0;

  // ---------------- traffic controller ----------------
  int len [4] = '{20, 20, 20, 20};
  int cyc = 0;
  always @(posedge tclk) cyc++;
  always @(negedge tclk) if (!reset_in) begin
    checks++;
    if (lights != ref_lights(state)) begin failures++; $display("FAIL lamps %b in %s", lights, state.name()); end
  end

  bit tlc_done = 0;
  initial begin
    tlc_state_e cur, want;
    int t0, dur, steps, wrote;
    logic sh, sg;
    reset_in = 1; sh_in = 0; sg_in = 0; prog_in = 0; param_sel = 0; param_value = 0;
    repeat (6) @(negedge tclk);
    reset_in = 0;
    repeat (3) @(negedge tclk);
    check(state == ST_A1, "starts in A1");
    cur = state; t0 = cyc; steps = 0; wrote = 0;
    while (steps < 160) begin
      sh = 0; sg = 0;
      if (steps >= 9) begin
        if ($urandom_range(0, 1) == 0) begin
          // the condition that bends this state's arrow
          case (cur)
            ST_A1, ST_A2, ST_A3, ST_C2: begin sh = 0; sg = 1; end
            ST_A4, ST_B, ST_C1:         begin sh = 1; sg = 0; end
            default: if ($urandom_range(0, 1) == 0) begin sh = 1; sg = 1; end else begin sh = 0; sg = 1; end
          endcase
        end else if ($urandom_range(0, 1) == 0) begin
          sh = 1'($urandom_range(0, 1)); sg = 1'($urandom_range(0, 1));
        end
      end
      repeat (20) @(negedge tclk);
      sh_in = sh; sg_in = sg;
      repeat (3) @(negedge tclk);
      sh_in = 0; sg_in = 0;
      if (steps == 40) begin
        param_sel = 2'd1; param_value = 5'd5;
        @(negedge tclk); prog_in = 1; repeat (6) @(negedge tclk); prog_in = 0;
        repeat (4) @(negedge tclk);
        if (seg_lo == 7'b1101101 && seg_hi == 7'b0111111) display_ok++;
        else begin failures++; $display("FAIL display"); end
        param_sel = 2'd3; param_value = 5'd9;
        @(negedge tclk); prog_in = 1; repeat (2) @(negedge tclk); prog_in = 0;
        repeat (4) @(negedge tclk);
        len[1] = 5; len[3] = 9; writes += 2; wrote = 1;
      end
      while (!dut.u_tlc.u_fsm.step) @(negedge tclk);
      @(negedge tclk);
      dur = cyc - t0;
      want = ref_next(cur, sh, sg);
      check(state == want, $sformatf("step %0d: %s sh=%0d sg=%0d -> %s, want %s",
                                     steps, cur.name(), sh, sg, state.name(), want.name()));
      if (!wrote && steps > 0) begin
        check(dur == len[ref_iv(cur)] * DIV + 3, $sformatf("duration of %s: %0d", cur.name(), dur));
        if (len[ref_iv(cur)] != 20 && dur == len[ref_iv(cur)] * DIV + 3) retimed++;
      end
      if (sh | sg) latched++;   // the request ended ~180 clocks before the step
      if (cur inside {ST_A1, ST_A2, ST_A3} && state == ST_B) branch[0]++;
      if (cur == ST_A4 && state == ST_A4) branch[1]++;
      if (cur == ST_B  && state == ST_A4) branch[2]++;
      if (cur == ST_C1 && state == ST_D)  branch[3]++;
      if (cur == ST_C2 && state == ST_C2) branch[4]++;
      if (cur == ST_D  && state == ST_D)  branch[5]++;
      if (cur == ST_D  && state == ST_C2) branch[6]++;
      if (cur == ST_D  && state == ST_A1) full_cycles++;
      steps++;
      cur = state; t0 = cyc; wrote = 0;
    end
    tlc_done = 1;
  end

  // ---------------- speech link ----------------
  int scyc = 0, n_tx = 0, n_rx = 0;
  int sent [$];
  logic [13:0] cur_sample;
  always @(negedge sclk) begin
    scyc++;
    enc_adc = 14'((scyc * 53 + $urandom_range(0, 31)) & 'h3FFF);
    dec_adc = {enc_dac, 2'($urandom_range(0, 3))};
  end
  always @(posedge sclk) if (!enc_rst && enc_samp) begin
    cur_sample = enc_adc;
    sent.push_back(int'(enc_adc));
    #1;
    checks++;
    if (!enc_val || int'(enc_dac) != ((int'(cur_sample) ^ ref_key(n_tx % 30)) >> 2)) begin
      failures++; $display("FAIL encrypt #%0d", n_tx);
    end else encrypted++;
    if (enc_dac != cur_sample[13:2]) differs++;
    if (enc_kidx == 0 && n_tx > 0) key_wraps++;
    n_tx++;
  end
  always @(posedge sclk) if (!dec_rst && dec_samp) begin
    #1;
    checks++;
    if (!dec_val || int'(dec_dac) != (sent[n_rx] >> 2)) begin
      failures++; $display("FAIL decrypt #%0d: got %h want %h", n_rx, dec_dac, sent[n_rx] >> 2);
    end else decrypted++;
    n_rx++;
  end
  initial begin
    enc_rst = 1; dec_rst = 1;
    repeat (3) @(posedge sclk);
    @(negedge sclk); enc_rst = 0;
    repeat (10) @(negedge sclk);
    dec_rst = 0;
  end

  // ---------------- verdict ----------------
  initial begin
    string names [7] = '{"A->B early end", "A4 hold", "B->A4", "C1->D", "C2 hold", "D hold", "D->C2"};
    wait (tlc_done && n_rx >= 200);
    for (int i = 0; i < 7; i++) begin
      $display("mechanism %-16s %0d", names[i], branch[i]);
      check(branch[i] > 0, {"mechanism ", names[i]});
    end
    $display("latched=%0d full_cycles=%0d writes=%0d retimed=%0d display=%0d", latched, full_cycles, writes, retimed, display_ok);
    $display("encrypted=%0d differs=%0d decrypted=%0d key_wraps=%0d", encrypted, differs, decrypted, key_wraps);
    check(latched > 0, "short request latched");
    check(full_cycles > 0, "normal full cycle");
    check(writes > 0 && retimed > 0, "parameter write changes timing");
    check(display_ok > 0, "display");
    check(key_wraps > 0, "key space wrap");
    check(encrypted > 0 && differs > encrypted / 2, "encryption changes the signal");
    check(decrypted > 0, "decryption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge tclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
