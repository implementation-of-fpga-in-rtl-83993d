// speech_unit: one end of the encrypted speech link (encryptor or decryptor).
//
// The transmitter digitizes speech with a 14-bit ADC, XORs each sample with a
// key from a repeating key space of 30 keys and sends the result through a
// 12-bit DAC over an ordinary analog channel.  The receiver digitizes that
// signal with its own 14-bit ADC and runs the very same unit: XOR with the
// same key sequence undoes the encryption and its DAC plays the speech again.
//
// Datapath, once per sample tick (SAMPLE_HZ, made from clk by a pulse
// divider):  dac_data <= (adc_data ^ key)[ADC_W-1 -: DAC_W]  -- the key is
// applied to all ADC bits, then the ADC_W-DAC_W least significant bits are
// dropped; the key generator then steps to the next key.  Because the
// receiver's ADC returns the 12 transmitted bits as its top bits, its output
// equals the transmitter's input with the two least significant bits dropped,
// provided the receiver's key index is one sample behind the transmitter's
// (each unit's output lags its input by one sample).
//
// Interface: adc_sample is the 1 MHz strobe that starts/reads the ADC;
// adc_data must be valid in that cycle.  dac_valid pulses with every new
// dac_data.  key_index shows the position in the key space.  Synchronous
// active-high reset restarts the key space at index 0.
//
// The sample rate, word widths, key width and XOR cipher follow the source
// design.  Dropping the two LSBs (the source also mentions the two MSBs) and
// the 100 MHz clock are this design's choices.
module speech_unit #(
  parameter int unsigned      CLK_HZ    = 100_000_000,
  parameter int unsigned      SAMPLE_HZ = 1_000_000,
  parameter int unsigned      ADC_W     = 14,
  parameter int unsigned      DAC_W     = 12,
  parameter int unsigned      KEY_W     = 14,
  parameter int unsigned      NUM_KEYS  = 30,
  parameter logic [KEY_W-1:0] SEED      = KEY_W'(14'h1ACE)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] adc_data,
  output logic             adc_sample,
  output logic [DAC_W-1:0] dac_data,
  output logic             dac_valid,
  output logic [4:0]       key_index
);

  logic             tick;
  logic [KEY_W-1:0] key;
  logic [ADC_W-1:0] mixed;

  pulse_divider #(.DIV(CLK_HZ / SAMPLE_HZ)) u_sample_clk (
    .clk, .rst, .clear(1'b0), .tick
  );

  speech_keygen #(.KEY_W(KEY_W), .NUM_KEYS(NUM_KEYS), .SEED(SEED)) u_keys (
    .clk, .rst, .advance(tick), .key, .key_index
  );

  assign adc_sample = tick;
  assign mixed      = adc_data ^ ADC_W'(key);

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_data  <= '0;
      dac_valid <= 1'b0;
    end else begin
      dac_valid <= tick;
      if (tick) dac_data <= mixed[ADC_W-1 -: DAC_W];
    end
  end

  initial begin
    assert (CLK_HZ % SAMPLE_HZ == 0) else $error("speech_unit: CLK_HZ must be a multiple of SAMPLE_HZ");
    assert (DAC_W <= ADC_W) else $error("speech_unit: DAC_W must not exceed ADC_W");
  end

endmodule
