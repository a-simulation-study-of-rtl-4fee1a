// call_memory: the call bit of one floor, with its call generator and flusher.
//
// The call bit is remembered in a flip-flop whose load enable (the "clock"
// of the counter IC in the original circuit) is the XOR of the floor's A=B
// comparator output and its call switch. While that XOR is high the bit
// takes the switch level:
//   A=B  switch | XOR | call bit afterwards
//    0     1    |  1  | 1  (call registered)
//    0     0    |  0  | held
//    1     0    |  1  | 0  (car has arrived: call flushed)
//    1     1    |  0  | held
// So a call is set by a press away from the floor and cleared when the car
// stands at the floor with the switch released. (Toggling the bit on every
// XOR edge, as a counter's lowest bit does, would also set a call on each
// floor the car merely passes, and would miss a flush when the switch is
// released in the same cycle the car arrives; loading the switch level while
// the XOR is high gives the table above without either problem.)
//
// A delay of FLUSH_DELAY sample pulses sits between the XOR and the bit: it
// is the serving time during which the car stands at a called floor with the
// call still pending. The switch is captured between sample pulses, so a
// press is seen if it lasts at least one clk cycle. With FLUSH_DELAY = 0 the
// XOR acts on the next clk edge.
//
// The XOR drive and the truth table follow the original design; loading
// the switch level instead of toggling, the delay length and the press
// capture are this design's own choices.
//
// Interface: clk, rst_n (synchronous, clears the call), tick (sample pulse
// that advances the delay line), at_floor (A=B), call_sw (switch level),
// call (stored call bit). Timing: the bit changes FLUSH_DELAY sample pulses
// after the XOR goes high, plus one clk cycle.
module call_memory #(
  parameter int unsigned FLUSH_DELAY = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic at_floor,
  input  logic call_sw,
  output logic call
);

  // Delayed view of the switch and of the A=B output.
  logic sw_d, eq_d;

  if (FLUSH_DELAY == 0) begin : g_nodelay
    assign sw_d = call_sw;
    assign eq_d = at_floor;
  end else begin : g_delay
    // A press between two sample pulses is remembered until the next pulse.
    logic                   sw_seen;
    logic [FLUSH_DELAY-1:0] sw_line, eq_line;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        sw_seen <= 1'b0;
        sw_line <= '0;
        eq_line <= '0;
      end else if (tick) begin
        sw_seen <= 1'b0;
        sw_line <= (sw_line << 1) | FLUSH_DELAY'(sw_seen | call_sw);
        eq_line <= (eq_line << 1) | FLUSH_DELAY'(at_floor);
      end else begin
        sw_seen <= sw_seen | call_sw;
      end
    end

    assign sw_d = sw_line[FLUSH_DELAY-1];
    assign eq_d = eq_line[FLUSH_DELAY-1];
  end

  // XOR "clock" of the call flip-flop.
  logic xor_clk;
  assign xor_clk = eq_d ^ sw_d;

  always_ff @(posedge clk) begin
    if (!rst_n)       call <= 1'b0;
    else if (xor_clk) call <= sw_d;
  end

endmodule
