// speech_keygen: key-space generator of the speech stream cipher.
//
// The cipher XORs every speech sample with a different key and repeats its
// key space every NUM_KEYS samples.  The keys come from a KEY_W-bit
// Fibonacci shift register (LFSR, feedback = XOR of bits 14, 5, 3 and 1 for
// the 14-bit default): each advance shifts it by one place.  After NUM_KEYS
// keys the register is loaded with SEED again, so the sequence of keys is the
// same for every block of NUM_KEYS samples, at both ends of the link.
//
// Interface: advance steps to the next key (one per sample); key is the key
// to use for the current sample; key_index counts 0..NUM_KEYS-1.
// Timing: key changes at the clock edge that samples advance.  Synchronous
// reset loads SEED and index 0.
//
// The 14-bit keys, the 30-key repeating key space and its generation by
// shifting follow the source design; the particular feedback taps and seed
// are this design's choice.
module speech_keygen #(
  parameter int unsigned          KEY_W    = 14,
  parameter int unsigned          NUM_KEYS = 30,
  parameter logic [KEY_W-1:0]     SEED     = KEY_W'(14'h1ACE)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             advance,
  output logic [KEY_W-1:0] key,
  output logic [4:0]       key_index
);

  localparam logic [4:0] LAST = 5'(NUM_KEYS - 1);

  logic fb;

  // Taps 14, 5, 3, 1 (counted from 1 at the LSB) for KEY_W = 14.
  assign fb = key[KEY_W-1] ^ key[4] ^ key[2] ^ key[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      key       <= SEED;
      key_index <= '0;
    end else if (advance) begin
      if (key_index == LAST) begin
        key       <= SEED;
        key_index <= '0;
      end else begin
        key       <= {key[KEY_W-2:0], fb};
        key_index <= key_index + 1'b1;
      end
    end
  end

  initial begin
    assert (NUM_KEYS >= 1 && NUM_KEYS <= 32) else $error("speech_keygen: NUM_KEYS must be 1..32");
    assert (KEY_W >= 5) else $error("speech_keygen: KEY_W must be at least 5");
    assert (SEED != '0) else $error("speech_keygen: SEED must not be zero");
  end

endmodule
