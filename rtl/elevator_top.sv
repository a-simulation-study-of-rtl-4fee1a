// elevator_top: complete elevator controller for an N-floor building.
//
// The car position is a floor number held in a register and stepped by at
// most one floor per step pulse. Pending calls are kept as one bit per floor.
// Every sample pulse the call half works out whether calls lie above, below
// or at the car; from that it picks the direction and whether to move, and
// the stepping half loads the chosen floor at the next step pulse. Reaching a
// called floor flushes its call after a serving delay, and the car stands at
// that floor until the call is gone. An idle car holds its floor and keeps
// reversing its stored direction until a call appears.
//
// The structure and the eight floors follow the original design; the clock
// frequency, serving delay and reset are this design's own choices.
//
// Parameters: N_FLOORS (8), SAMPLE_DIV clk cycles per sample pulse (1000,
// i.e. one second at an assumed 1 kHz clock), STEP_SAMPLES sample pulses per
// floor step (10), FLUSH_DELAY serving delay in sample pulses (10),
// INIT_FLOOR and INIT_DIR after reset (ground floor, up).
//
// Interface: clk, rst_n (synchronous, active low), call_sw[N] (call switch
// levels) -> floor (present floor), next_floor, calls[N] (pending calls),
// dir (stored direction, 1 = up), moving (move select), serving (a call is
// pending at the floor the comparators see), call_above, call_below (a call
// is pending above / below that floor), sample_tick, step_tick.
module elevator_top
  import elevator_pkg::*;
#(
  parameter int unsigned N_FLOORS     = elevator_pkg::DEF_N_FLOORS,
  parameter int unsigned SAMPLE_DIV   = 1000,
  parameter int unsigned STEP_SAMPLES = 10,
  parameter int unsigned FLUSH_DELAY  = 10,
  parameter int unsigned INIT_FLOOR   = 0,
  parameter dir_e        INIT_DIR     = DIR_UP,
  localparam int unsigned FW          = $clog2(N_FLOORS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_FLOORS-1:0] call_sw,
  output logic [FW-1:0]       floor,
  output logic [FW-1:0]       next_floor,
  output logic [N_FLOORS-1:0] calls,
  output dir_e                dir,
  output logic                moving,
  output logic                serving,
  output logic                call_above,
  output logic                call_below,
  output logic                sample_tick,
  output logic                step_tick
);

  logic [FW-1:0] cmp_floor;
  dir_e          dir_sel;
  logic          move, any_above, any_below, any_here;

  pulse_gen #(.SAMPLE_DIV(SAMPLE_DIV), .STEP_SAMPLES(STEP_SAMPLES)) u_pulses (
    .clk        (clk),
    .rst_n      (rst_n),
    .sample_tick(sample_tick),
    .step_tick  (step_tick)
  );

  floor_stepper #(.N_FLOORS(N_FLOORS), .INIT_FLOOR(INIT_FLOOR)) u_stepper (
    .clk        (clk),
    .rst_n      (rst_n),
    .step_load  (step_tick),
    .sample_load(sample_tick),
    .dir_sel    (dir_sel),
    .move       (move),
    .floor_q    (floor),
    .cmp_floor  (cmp_floor),
    .next_floor (next_floor)
  );

  call_logic #(
    .N_FLOORS   (N_FLOORS),
    .FLUSH_DELAY(FLUSH_DELAY),
    .INIT_DIR   (INIT_DIR)
  ) u_calls (
    .clk      (clk),
    .rst_n    (rst_n),
    .tick     (sample_tick),
    .cmp_floor(cmp_floor),
    .call_sw  (call_sw),
    .calls    (calls),
    .move     (move),
    .dir_sel  (dir_sel),
    .dir_q    (dir),
    .any_above(any_above),
    .any_below(any_below),
    .any_here (any_here)
  );

  assign moving  = move;
  assign serving    = any_here;
  assign call_above = any_above;
  assign call_below = any_below;

endmodule
