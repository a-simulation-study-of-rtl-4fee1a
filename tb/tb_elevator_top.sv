// tb_elevator_top: end-to-end test of the controller at a reduced time
// scale (2 clock cycles per sample pulse, 4 sample pulses per floor step,
// serving delay of 4 sample pulses); see elevator_scenario.svh for the
// scenario and the checks.
module tb_elevator_top;
  import elevator_pkg::*;

  localparam int SAMPLE_DIV = 2, STEP_SAMPLES = 4, FLUSH_DELAY = 4;
  localparam int STEP_CYCLES = SAMPLE_DIV * STEP_SAMPLES;

  logic       clk = 0, rst_n;
  logic [7:0] call_sw, calls;
  logic [2:0] floor, next_floor;
  dir_e       dir;
  logic       moving, serving, call_above, call_below, sample_tick, step_tick;

  always #5 clk = ~clk;

  elevator_top #(
    .SAMPLE_DIV(SAMPLE_DIV), .STEP_SAMPLES(STEP_SAMPLES), .FLUSH_DELAY(FLUSH_DELAY)
  ) dut (
    .clk(clk), .rst_n(rst_n), .call_sw(call_sw), .floor(floor), .next_floor(next_floor),
    .calls(calls), .dir(dir), .moving(moving), .serving(serving), .call_above(call_above),
    .call_below(call_below), .sample_tick(sample_tick), .step_tick(step_tick));

  `include "tb/elevator_scenario.svh"
endmodule
