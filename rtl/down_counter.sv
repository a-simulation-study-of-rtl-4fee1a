// down_counter: next floor downward, i_next = i - 1.
//
// Pure combinational logic written bit by bit as a ripple of borrow terms.
// The borrow-free condition for bit k is carried as an OR chain: a lower bit
// that is 1 absorbs the borrow, so bit k keeps its value when the carry-in
// term (constant 0) OR any lower input bit is 1 and flips otherwise. This is
// the product-of-sums form of the truth table for "subtract one". The ground
// floor wraps to the top floor; the controller never selects this output at
// the ground floor, because the downward direction is only chosen when a call
// lies below.
//
// The gate equations follow the original TTL design; the wrap row is this
// design's own choice.
//
// Interface: floor_i (current floor) -> floor_o (floor below). No clock.
module down_counter #(
  parameter int unsigned FLOOR_W = elevator_pkg::DEF_FLOOR_W
) (
  input  logic [FLOOR_W-1:0] floor_i,
  output logic [FLOOR_W-1:0] floor_o
);

  // keep[k] = 1 when bit k does not flip: C OR any of the bits below k.
  logic [FLOOR_W-1:0] keep;
  assign keep[0] = 1'b0;

  for (genvar k = 0; k < int'(FLOOR_W); k++) begin : g_bit
    // O_k = (~C + lower) * ~I_k + (C + lower) * I_k, with C = 0
    assign floor_o[k]  = (~keep[k] & ~floor_i[k]) | (keep[k] & floor_i[k]);
    if (k + 1 < int'(FLOOR_W)) begin : g_next
      assign keep[k + 1] = keep[k] | floor_i[k];
    end
  end

endmodule
