// elevator_pkg: sizes and types shared by the elevator controller.
//
// The controller serves an eight-storey building, so a floor number is three
// bits wide: ground floor is 3'b000 and the top (7th) floor is 3'b111. The
// direction bit follows the convention 1 = upward, 0 = downward.
package elevator_pkg;

  // Number of floors served and the width of a floor number.
  localparam int unsigned DEF_N_FLOORS = 8;
  localparam int unsigned DEF_FLOOR_W  = $clog2(DEF_N_FLOORS);

  typedef logic [DEF_FLOOR_W-1:0] floor_t;

  // Direction of travel as held in the direction memory.
  typedef enum logic {
    DIR_DOWN = 1'b0,
    DIR_UP   = 1'b1
  } dir_e;

  // Result of comparing a floor with the current floor.
  typedef struct packed {
    logic above;  // the floor lies above the current floor (A>B)
    logic below;  // the floor lies below the current floor (A<B)
    logic here;   // the floor is the current floor (A=B)
  } floor_rel_t;

endpackage
