// storage_reg: parallel-in, parallel-out register with hold.
//
// This is the way the controller uses a 4-bit universal shift register: only
// its parallel-load and hold modes. When load is high at a rising clock edge
// the input word is copied to the output; otherwise the output holds its
// value indefinitely. The load pulse plays the role of the slow "clock HIGH"
// pulse of the original circuit, while clk is the fast system clock, so the
// whole design stays in one clock domain. The shift modes of the part are not
// used and not built.
//
// Load and hold follow the original use of the part; the clock enable and
// the reset are this design's own choices.
//
// Interface: clk, rst_n (active-low, synchronous, loads RESET_VAL), load,
// d, q. q changes one clk edge after a load pulse.
module storage_reg #(
  parameter int unsigned         WIDTH     = 4,
  parameter logic [WIDTH-1:0]    RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= RESET_VAL;
    else if (load)  q <= d;
  end

endmodule
