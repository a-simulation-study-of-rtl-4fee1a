// tb_elevator_full: the end-to-end scenario of elevator_scenario.svh with the
// controller at its default parameters: eight floors, 1000 clock cycles per
// sample pulse, ten sample pulses per floor step, a serving delay of ten
// sample pulses.
module tb_elevator_full;
  import elevator_pkg::*;

  // Defaults of elevator_top, restated for the checks.
  localparam int STEP_SAMPLES = 10, FLUSH_DELAY = 10;
  localparam int STEP_CYCLES  = 1000 * STEP_SAMPLES;

  logic       clk = 0, rst_n;
  logic [7:0] call_sw, calls;
  logic [2:0] floor, next_floor;
  dir_e       dir;
  logic       moving, serving, call_above, call_below, sample_tick, step_tick;

  always #5 clk = ~clk;

  elevator_top dut (
    .clk(clk), .rst_n(rst_n), .call_sw(call_sw), .floor(floor), .next_floor(next_floor),
    .calls(calls), .dir(dir), .moving(moving), .serving(serving), .call_above(call_above),
    .call_below(call_below), .sample_tick(sample_tick), .step_tick(step_tick));

  `include "tb/elevator_scenario.svh"
endmodule
