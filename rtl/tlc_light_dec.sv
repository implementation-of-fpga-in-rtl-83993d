// tlc_light_dec: lamp decoder of the traffic light controller.
//
// Purely combinational.  Maps the present state {Qx,Qy,Qz} to the six lamps:
//   A1..A4 (0xx)  highway green,  side road red
//   B      (100)  highway yellow, side road red
//   C1, C2 (101, 110) highway red, side road green
//   D      (111)  highway red,    side road yellow
// in the reduced two-level form HR = QxQy + QxQz, HY = Qx~Qy~Qz, HG = ~Qx,
// CR = ~Qx + ~Qy~Qz, CY = QxQyQz, CG = QxQy~Qz + Qx~QyQz, which is the source
// design's output truth table.  Lamps are active high.
module tlc_light_dec
  import tlc_pkg::*;
(
  input  tlc_state_e  state,
  output tlc_lights_t lights
);

  logic qx, qy, qz;
  assign {qx, qy, qz} = state;

  always_comb begin
    lights.hr = (qx & qy) | (qx & qz);
    lights.hy = qx & ~qy & ~qz;
    lights.hg = ~qx;
    lights.cr = ~qx | (~qy & ~qz);
    lights.cy = qx & qy & qz;
    lights.cg = (qx & qy & ~qz) | (qx & ~qy & qz);
  end

endmodule
