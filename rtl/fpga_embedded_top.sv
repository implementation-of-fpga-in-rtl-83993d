// fpga_embedded_top: two FPGA embedded systems side by side.
//
// 1. tlc_top  - a prioritized highway / side-road traffic light controller
//               with exception (emergency vehicle) inputs and operator-
//               programmable interval lengths, clocked at 4 MHz.
// 2. speech_unit x2 - the transmitting (encrypting) and receiving
//               (decrypting) ends of a speech link that XORs 1 MHz, 14-bit
//               speech samples with a repeating space of 30 14-bit keys and
//               sends 12-bit words through a DAC.  The analog channel (DAC ->
//               line -> ADC) lies outside this module: connect enc_dac_data to
//               the line and the line's ADC to dec_adc_data.
//
// The two designs share nothing; each has its own clock, reset and ports, as
// they would on two separate boards.  See the individual modules for their
// timing.  Placing them in one top is only a convenience for building and
// testing.
module fpga_embedded_top
  import tlc_pkg::*;
#(
  parameter int unsigned TLC_CLK_HZ = 4_000_000,
  parameter int unsigned TIME_W     = 5,
  parameter int unsigned SP_CLK_HZ  = 100_000_000,
  parameter int unsigned SAMPLE_HZ  = 1_000_000,
  parameter int unsigned NUM_KEYS   = 30
) (
  // traffic light controller
  input  logic              tlc_clk,
  input  logic              tlc_reset,
  input  logic              tlc_sh,
  input  logic              tlc_sg,
  input  logic              tlc_prog,
  input  logic [1:0]        tlc_param_sel,
  input  logic [TIME_W-1:0] tlc_param_value,
  output tlc_lights_t       tlc_lights,
  output tlc_state_e        tlc_state,
  output logic [6:0]        tlc_seg_lo,
  output logic [6:0]        tlc_seg_hi,
  // speech link, transmitting end
  input  logic              enc_clk,
  input  logic              enc_rst,
  input  logic [13:0]       enc_adc_data,
  output logic              enc_adc_sample,
  output logic [11:0]       enc_dac_data,
  output logic              enc_dac_valid,
  output logic [4:0]        enc_key_index,
  // speech link, receiving end
  input  logic              dec_clk,
  input  logic              dec_rst,
  input  logic [13:0]       dec_adc_data,
  output logic              dec_adc_sample,
  output logic [11:0]       dec_dac_data,
  output logic              dec_dac_valid,
  output logic [4:0]        dec_key_index
);

  tlc_top #(.CLK_HZ(TLC_CLK_HZ), .TIME_W(TIME_W)) u_tlc (
    .clk(tlc_clk), .reset_in(tlc_reset), .sh_in(tlc_sh), .sg_in(tlc_sg),
    .prog_in(tlc_prog), .param_sel(tlc_param_sel), .param_value(tlc_param_value),
    .lights(tlc_lights), .state(tlc_state), .seg_lo(tlc_seg_lo), .seg_hi(tlc_seg_hi)
  );

  speech_unit #(.CLK_HZ(SP_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .NUM_KEYS(NUM_KEYS)) u_encrypt (
    .clk(enc_clk), .rst(enc_rst), .adc_data(enc_adc_data), .adc_sample(enc_adc_sample),
    .dac_data(enc_dac_data), .dac_valid(enc_dac_valid), .key_index(enc_key_index)
  );

  speech_unit #(.CLK_HZ(SP_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .NUM_KEYS(NUM_KEYS)) u_decrypt (
    .clk(dec_clk), .rst(dec_rst), .adc_data(dec_adc_data), .adc_sample(dec_adc_sample),
    .dac_data(dec_dac_data), .dac_valid(dec_dac_valid), .key_index(dec_key_index)
  );

endmodule
