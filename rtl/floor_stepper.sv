// floor_stepper: the floor-stepping loop (counters, MUX#1, MUX#2, registers).
//
// The floor register holds the car's present floor i. The up and down
// counters form i+1 and i-1 from it; MUX#1 picks one of them with the
// direction select; MUX#2 picks between i and the MUX#1 result with the move
// select. On every step pulse the floor register loads the MUX#2 output, so
// the car advances by at most one floor per step, and this closes the
// feedback loop. The comparator register copies the present floor on every
// sample pulse and feeds it to the floor comparators; because a step pulse
// always coincides with a sample pulse, it shows the new floor one sample
// period after each step.
//
// The loop follows the original design. One change is this design's own:
// the original feeds the comparators from the MUX#2 output, i.e. the next
// floor, which would flush a call one floor early; here they see the
// present floor.
//
// Interface: clk, rst_n (floor and comparator registers load INIT_FLOOR),
// step_load, sample_load, dir_sel (1 = up), move -> floor_q (present floor),
// cmp_floor (floor seen by the comparators), next_floor (MUX#2 output).
module floor_stepper
  import elevator_pkg::*;
#(
  parameter int unsigned N_FLOORS   = elevator_pkg::DEF_N_FLOORS,
  parameter int unsigned INIT_FLOOR = 0,
  localparam int unsigned FW        = $clog2(N_FLOORS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step_load,
  input  logic          sample_load,
  input  dir_e          dir_sel,
  input  logic          move,
  output logic [FW-1:0] floor_q,
  output logic [FW-1:0] cmp_floor,
  output logic [FW-1:0] next_floor
);

  logic [FW-1:0] floor_up, floor_down, mux1_out;

  up_counter #(.FLOOR_W(FW)) u_up (
    .floor_i(floor_q),
    .floor_o(floor_up)
  );

  down_counter #(.FLOOR_W(FW)) u_down (
    .floor_i(floor_q),
    .floor_o(floor_down)
  );

  // MUX#1: direction decides between the floor below and the floor above.
  floor_mux #(.FLOOR_W(FW)) u_mux1 (
    .sel(dir_sel == DIR_UP),
    .in0(floor_down),
    .in1(floor_up),
    .out(mux1_out)
  );

  // MUX#2: move decides between staying and taking the MUX#1 floor.
  floor_mux #(.FLOOR_W(FW)) u_mux2 (
    .sel(move),
    .in0(floor_q),
    .in1(mux1_out),
    .out(next_floor)
  );

  // Floor register: the feedback path, loaded on the step pulse.
  storage_reg #(.WIDTH(FW), .RESET_VAL(FW'(INIT_FLOOR))) u_floor_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (step_load),
    .d    (next_floor),
    .q    (floor_q)
  );

  // Comparator register: the floor seen by the comparators.
  storage_reg #(.WIDTH(FW), .RESET_VAL(FW'(INIT_FLOOR))) u_cmp_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (sample_load),
    .d    (floor_q),
    .q    (cmp_floor)
  );

  // The car never leaves the building: the direction is only "up" when a call
  // lies above and only "down" when one lies below. Only checked when the
  // floor count leaves unused codes.
  if (N_FLOORS < (1 << FW)) begin : g_range_check
    always_ff @(posedge clk) begin
      if (rst_n) assert (floor_q < FW'(N_FLOORS))
        else $error("floor register out of range: %0d", floor_q);
    end
  end

endmodule
