// up_counter: next floor upward, i_next = i + 1.
//
// Pure combinational logic written bit by bit as a ripple of carry terms:
// every output bit is its input bit XOR the AND of the carry-in and all lower
// input bits, which is the sum-of-products form of the truth table for
// "add one" with the carry-in tied to 1. The top floor wraps to the ground
// floor; the controller never selects this output at the top floor, because
// the upward direction is only chosen when a call lies above.
//
// The gate equations follow the original TTL design; the wrap row is this
// design's own choice.
//
// Interface: floor_i (current floor) -> floor_o (floor above). No clock.
module up_counter #(
  parameter int unsigned FLOOR_W = elevator_pkg::DEF_FLOOR_W
) (
  input  logic [FLOOR_W-1:0] floor_i,
  output logic [FLOOR_W-1:0] floor_o
);

  // carry[k] is the carry into bit k; the carry into bit 0 is the constant 1.
  logic [FLOOR_W-1:0] carry;
  assign carry[0] = 1'b1;

  for (genvar k = 0; k < int'(FLOOR_W); k++) begin : g_bit
    // O_k = ~C_k & I_k | C_k & ~I_k
    assign floor_o[k]   = (~carry[k] & floor_i[k]) | (carry[k] & ~floor_i[k]);
    if (k + 1 < int'(FLOOR_W)) begin : g_next
      assign carry[k + 1] = carry[k] & floor_i[k];
    end
  end

endmodule
