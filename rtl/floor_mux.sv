// floor_mux: two-way selector for a floor number, O = ~C & I1 | C & I2.
//
// Built exactly as the gate form: one AND per bit with the select, one AND
// per bit with the inverted select and an OR per bit. The controller uses it
// twice. As MUX#1 the select is the direction bit, I1 the floor below and I2
// the floor above. As MUX#2 the select is the move bit, I1 the present floor
// and I2 the output of MUX#1.
//
// The AND/NOT/OR structure follows the original design.
//
// Interface: sel, in0 (chosen when sel = 0), in1 (chosen when sel = 1),
// out. No clock.
module floor_mux #(
  parameter int unsigned FLOOR_W = elevator_pkg::DEF_FLOOR_W
) (
  input  logic               sel,
  input  logic [FLOOR_W-1:0] in0,
  input  logic [FLOOR_W-1:0] in1,
  output logic [FLOOR_W-1:0] out
);

  always_comb begin
    for (int k = 0; k < FLOOR_W; k++) begin
      out[k] = (~sel & in0[k]) | (sel & in1[k]);
    end
  end

endmodule
