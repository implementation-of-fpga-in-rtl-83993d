// hex7seg: two-digit hexadecimal seven-segment decoder.
//
// Shows a timing parameter of the traffic light controller on two hex LED
// digits.  Each digit's segments are {g,f,e,d,c,b,a}, active high (segment a
// on top, then clockwise, g in the middle).  Purely combinational.
// The display follows the source design; the segment order, polarity and the
// second digit (needed for 5-bit parameters) are this design's choices.
module hex7seg #(
  parameter int unsigned TIME_W = 5
) (
  input  logic [TIME_W-1:0] value,
  output logic [6:0]        seg_lo,
  output logic [6:0]        seg_hi
);

  function automatic logic [6:0] digit(input logic [3:0] d);
    unique case (d)
      4'h0: digit = 7'b0111111;
      4'h1: digit = 7'b0000110;
      4'h2: digit = 7'b1011011;
      4'h3: digit = 7'b1001111;
      4'h4: digit = 7'b1100110;
      4'h5: digit = 7'b1101101;
      4'h6: digit = 7'b1111101;
      4'h7: digit = 7'b0000111;
      4'h8: digit = 7'b1111111;
      4'h9: digit = 7'b1101111;
      4'hA: digit = 7'b1110111;
      4'hB: digit = 7'b1111100;
      4'hC: digit = 7'b0111001;
      4'hD: digit = 7'b1011110;
      4'hE: digit = 7'b1111001;
      4'hF: digit = 7'b1110001;
      default: digit = 7'b0000000;
    endcase
  endfunction

  logic [7:0] wide;
  assign wide = 8'(value);

  always_comb begin
    seg_lo = digit(wide[3:0]);
    seg_hi = digit(wide[7:4]);
  end

endmodule
