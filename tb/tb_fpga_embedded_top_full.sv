// tb_fpga_embedded_top_full: the top at its real sizes and rates, no
// parameter overrides.
//
// Traffic light controller at 4 MHz: one complete signal cycle
// A1 A2 A3 A4 (80 s highway green), B (20 s highway yellow), C1 C2 (40 s side
// green), D (20 s side yellow) and back to A1 - 160 s, 640 million clocks.
// Every state must last 20 s * 4,000,000 + 3 clocks, and the lamps are checked
// at every state change.  A short side-road request early in the following
// A1 must then end the highway green after that one interval and go to B.
//
// Speech link at 100 MHz with 1 MHz samples: 200 samples (more than six key
// spaces of 30 keys) go through the encrypting unit, a channel model and the
// decrypting unit; the speech clock is then stopped to keep the run short.
module tb_fpga_embedded_top_full;
  import tlc_pkg::*;

  logic tclk = 0, reset_in, sh_in, sg_in, prog_in;
  logic [1:0] param_sel;
  logic [4:0] param_value;
  tlc_lights_t lights;
  tlc_state_e state;
  logic [6:0] seg_lo, seg_hi;
  logic sclk = 0, sclk_on = 1, enc_rst, dec_rst;
  logic [13:0] enc_adc, dec_adc;
  logic enc_samp, dec_samp, enc_val, dec_val;
  logic [11:0] enc_dac, dec_dac;
  logic [4:0] enc_kidx, dec_kidx;
  int checks = 0, failures = 0;

  fpga_embedded_top dut (
    .tlc_clk(tclk), .tlc_reset(reset_in), .tlc_sh(sh_in), .tlc_sg(sg_in), .tlc_prog(prog_in),
    .tlc_param_sel(param_sel), .tlc_param_value(param_value), .tlc_lights(lights),
    .tlc_state(state), .tlc_seg_lo(seg_lo), .tlc_seg_hi(seg_hi),
    .enc_clk(sclk), .enc_rst, .enc_adc_data(enc_adc), .enc_adc_sample(enc_samp),
    .enc_dac_data(enc_dac), .enc_dac_valid(enc_val), .enc_key_index(enc_kidx),
    .dec_clk(sclk), .dec_rst, .dec_adc_data(dec_adc), .dec_adc_sample(dec_samp),
    .dec_dac_data(dec_dac), .dec_dac_valid(dec_val), .dec_key_index(dec_kidx));

  always #125 tclk = ~tclk;                       // 4 MHz
  initial while (sclk_on) #5 sclk = ~sclk;         // 100 MHz until the link test ends

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [5:0] ref_lights(tlc_state_e s);
    case (s)
      ST_B:         return 6'b010100;
      ST_C1, ST_C2: return 6'b100001;
      ST_D:         return 6'b100010;
      default:      return 6'b001100;
    endcase
  endfunction

  function automatic int ref_key(int n);
    int k = 'h1ACE;
    for (int i = 0; i < n; i++) k = ((k << 1) | ($countones(k & 'h2015) & 1)) & 'h3FFF;
    return k;
  endfunction

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
    check(enc_val && int'(enc_dac) == ((int'(cur_sample) ^ ref_key(n_tx % 30)) >> 2), "encrypt");
    n_tx++;
  end
  always @(posedge sclk) if (!dec_rst && dec_samp) begin
    #1;
    check(dec_val && int'(dec_dac) == (sent[n_rx] >> 2), "decrypt");
    n_rx++;
  end
  initial begin
    enc_rst = 1; dec_rst = 1;
    repeat (3) @(posedge sclk);
    @(negedge sclk); enc_rst = 0;
    repeat (100) @(negedge sclk);   // one sample period at 1 MHz
    dec_rst = 0;
    wait (n_rx >= 200);
    sclk_on = 0;
  end

  // ---------------- traffic controller ----------------
  localparam longint STATE_CLOCKS = 64'd20 * 64'd4_000_000 + 64'd3;
  // clocks elapsed, from simulated time (one 4 MHz period = 250 ns)
  function automatic longint cyc();
    return longint'($time / 250);
  endfunction

  initial begin
    static tlc_state_e expect_seq [9] = '{ST_A1, ST_A2, ST_A3, ST_A4, ST_B, ST_C1, ST_C2, ST_D, ST_A1};
    longint t0;
    reset_in = 1; sh_in = 0; sg_in = 0; prog_in = 0; param_sel = 0; param_value = 0;
    repeat (6) @(negedge tclk);
    reset_in = 0;
    repeat (3) @(negedge tclk);
    check(state == ST_A1, "starts in A1");
    check(lights == ref_lights(ST_A1), "lamps A1");
    t0 = cyc();
    for (int i = 1; i < 9; i++) begin
      @(state);
      @(negedge tclk);
      check(state == expect_seq[i], $sformatf("state %0d is %s", i, state.name()));
      check(lights == ref_lights(state), "lamps");
      if (i > 1) check(cyc() - t0 == STATE_CLOCKS, $sformatf("state length %0d clocks", cyc() - t0));
      $display("%s entered after %0d clocks", state.name(), cyc() - t0);
      t0 = cyc();
    end
    // side-road request in A1 (sh=0, sg=1): A1 ends to B
    repeat (100) @(negedge tclk);
    sg_in = 1; repeat (4) @(negedge tclk); sg_in = 0;
    @(state);
    @(negedge tclk);
    check(state == ST_B, "side-road request ends highway green early");
    check(cyc() - t0 == STATE_CLOCKS, "early-ended state still lasts one interval");
    wait (n_rx >= 200);
    check(n_tx >= 200, "speech samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd250 * 64'd800_000_000);   // 800 million clocks
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
