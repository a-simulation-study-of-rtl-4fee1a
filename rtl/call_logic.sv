// call_logic: the call-handling half of the controller.
//
// One slice per floor: a floor_comparator with the floor's own number, a
// call_memory fed by the floor's switch and the comparator's A=B output, and
// a call_distance_checker that ANDs the two. mux_selector_gen merges all
// slices into the move select (MUX#2), the direction select (MUX#1) and the
// stored direction.
//
// The per-floor slices follow the original design.
//
// Interface: clk, rst_n, tick (sample pulse), cmp_floor (floor seen by the
// comparators), call_sw[N] (switch levels) -> calls[N] (pending calls),
// move, dir_sel, dir_q, any_above, any_below, any_here.
module call_logic
  import elevator_pkg::*;
#(
  parameter int unsigned N_FLOORS    = elevator_pkg::DEF_N_FLOORS,
  parameter int unsigned FLUSH_DELAY = 10,
  parameter dir_e        INIT_DIR    = DIR_UP,
  localparam int unsigned FW         = $clog2(N_FLOORS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  logic [FW-1:0]       cmp_floor,
  input  logic [N_FLOORS-1:0] call_sw,
  output logic [N_FLOORS-1:0] calls,
  output logic                move,
  output dir_e                dir_sel,
  output dir_e                dir_q,
  output logic                any_above,
  output logic                any_below,
  output logic                any_here
);

  floor_rel_t rel      [N_FLOORS];
  floor_rel_t call_rel [N_FLOORS];

  for (genvar f = 0; f < int'(N_FLOORS); f++) begin : g_floor
    floor_comparator #(.FLOOR_W(FW), .FLOOR_ID(f)) u_cmp (
      .cur_floor(cmp_floor),
      .rel      (rel[f])
    );

    call_memory #(.FLUSH_DELAY(FLUSH_DELAY)) u_mem (
      .clk     (clk),
      .rst_n   (rst_n),
      .tick    (tick),
      .at_floor(rel[f].here),
      .call_sw (call_sw[f]),
      .call    (calls[f])
    );

    call_distance_checker u_chk (
      .rel     (rel[f]),
      .call    (calls[f]),
      .call_rel(call_rel[f])
    );
  end

  mux_selector_gen #(.N_FLOORS(N_FLOORS), .INIT_DIR(INIT_DIR)) u_sel (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (tick),
    .call_rel (call_rel),
    .move     (move),
    .dir_sel  (dir_sel),
    .dir_q    (dir_q),
    .any_above(any_above),
    .any_below(any_below),
    .any_here (any_here)
  );

endmodule
