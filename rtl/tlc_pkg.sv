// tlc_pkg: types shared by the traffic light controller.
//
// The eight controller states carry the fixed three-bit codes {Qx,Qy,Qz}
// of the controller's state table, so the state register can be watched
// directly on a test port.  A1..A4 are the four 20 s highway-green stages,
// B the highway yellow, C1..C2 the two side-road-green stages and D the
// side-road yellow.  The interval code selects which timing parameter
// governs a state; the lamp struct orders the six lamps as {HR,HY,HG,CR,CY,CG}.
package tlc_pkg;

  typedef enum logic [2:0] {
    ST_A1 = 3'b000,
    ST_A2 = 3'b001,
    ST_A3 = 3'b010,
    ST_A4 = 3'b011,
    ST_B  = 3'b100,
    ST_C1 = 3'b101,
    ST_C2 = 3'b110,
    ST_D  = 3'b111
  } tlc_state_e;

  // Which stored timing parameter a state uses.
  typedef enum logic [1:0] {
    IV_HWY_GREEN  = 2'd0,  // A1..A4
    IV_HWY_YELLOW = 2'd1,  // B
    IV_SRD_GREEN  = 2'd2,  // C1, C2
    IV_SRD_YELLOW = 2'd3   // D
  } tlc_interval_e;

  typedef struct packed {
    logic hr;
    logic hy;
    logic hg;
    logic cr;
    logic cy;
    logic cg;
  } tlc_lights_t;

  // Exception requests: sh = highway, sg = side road.
  typedef struct packed {
    logic sh;
    logic sg;
  } tlc_ex_t;

endpackage
