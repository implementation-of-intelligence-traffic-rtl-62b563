// tlc_pkg: types and constants shared by the three traffic light controllers.
//
// Two-way controller (hld1..hld5): the signal state is a 3-bit code. Bit 2
// tells which road has right of way (0 north-south, 1 east-west) and bit 0
// marks the yellow (clearing) step. The codes 000, 001, 100, 101 are the
// ones the original design shows on its sign_state bus; the state names
// spell out the lamps, e.g. rewgsn = red east-west, green south-north.
// Lamp vectors are 2 bits: bit 1 north-south, bit 0 east-west.
//
// Four-way controller: a 2-bit step counter (green, yellow 1, yellow 2 plus
// pedestrian) and a 2-bit direction (north, east, south, west).
package tlc_pkg;

  // Two-way controller signal states.
  typedef enum logic [2:0] {
    REWGSN = 3'b000,   // east-west red,   north-south green
    REWYSN = 3'b001,   // east-west red,   north-south yellow
    GEWRSN = 3'b100,   // east-west green, north-south red
    YEWRSN = 3'b101    // east-west yellow, north-south red
  } sign_state_t;

  // Lamp vector bit positions.
  localparam int unsigned LAMP_EW = 0;
  localparam int unsigned LAMP_NS = 1;

  // Width of the seconds count of the two-way controller.
  localparam int unsigned SEC_W = 5;

  // Successor in the fixed cycle 000 -> 001 -> 100 -> 101 -> 000.
  function automatic sign_state_t next_sign_state(sign_state_t s);
    case (s)
      REWGSN:  return REWYSN;
      REWYSN:  return GEWRSN;
      GEWRSN:  return YEWRSN;
      default: return REWGSN;
    endcase
  endfunction

  // Four-way controller step within one direction's turn.
  typedef enum logic [1:0] {
    STEP_GREEN  = 2'b00,
    STEP_YELLOW1 = 2'b01,
    STEP_YELLOW2 = 2'b10
  } step_t;

  // Four-way controller directions, in the order they get green.
  typedef enum logic [1:0] {
    DIR_NORTH = 2'b00,
    DIR_EAST  = 2'b01,
    DIR_SOUTH = 2'b10,
    DIR_WEST  = 2'b11
  } dir_t;

endpackage
