// pulse_gen: the two timing pulses of the controller.
//
// sample_tick is a one-clk-cycle pulse every SAMPLE_DIV clock cycles (the
// once-per-second pulse of the comparator register, direction memory and
// call serving delay). step_tick is a one-cycle pulse on every STEP_SAMPLES-th
// sample_tick (the ten-second pulse that moves the car by one floor). The two
// pulses coincide on a step. SAMPLE_DIV = 1000 assumes a 1 kHz system clock.
//
// The 1 s / 10 s ratio follows the original design; the clock frequency and
// the division from one clock are this design's own choices.
//
// Interface: clk, rst_n (synchronous; counting restarts) -> sample_tick,
// step_tick. The first sample_tick comes SAMPLE_DIV cycles after reset.
module pulse_gen #(
  parameter int unsigned SAMPLE_DIV   = 1000,
  parameter int unsigned STEP_SAMPLES = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample_tick,
  output logic step_tick
);

  localparam int unsigned DIV_W  = (SAMPLE_DIV   > 1) ? $clog2(SAMPLE_DIV)   : 1;
  localparam int unsigned STEP_W = (STEP_SAMPLES > 1) ? $clog2(STEP_SAMPLES) : 1;

  logic [DIV_W-1:0]  div_cnt;
  logic [STEP_W-1:0] step_cnt;
  logic              div_wrap, step_wrap;

  assign div_wrap  = (div_cnt == DIV_W'(SAMPLE_DIV - 1));
  assign step_wrap = (step_cnt == STEP_W'(STEP_SAMPLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      step_cnt    <= '0;
      sample_tick <= 1'b0;
      step_tick   <= 1'b0;
    end else begin
      sample_tick <= div_wrap;
      step_tick   <= div_wrap & step_wrap;
      if (div_wrap) begin
        div_cnt  <= '0;
        step_cnt <= step_wrap ? '0 : step_cnt + 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
