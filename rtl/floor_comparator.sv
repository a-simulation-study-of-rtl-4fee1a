// floor_comparator: where a fixed floor lies relative to the current floor.
//
// One comparator exists per floor, with that floor's number as the fixed
// A word and the current floor as the B word. Each bit pair is compared with
// the single-bit gate equations  gt = A & ~B,  lt = ~A & B,
// eq = A & B | ~A & ~B,  and the words are then resolved from the most
// significant bit down, as a 4-bit magnitude comparator does with its top
// bit pair grounded.
//
// The single-bit equations follow the original design; the MSB-first
// resolution is the standard one of a magnitude comparator. For the ground
// floor (FLOOR_ID = 0) rel.below is constant 0, as nothing lies below it.
//
// Interface: cur_floor (B) -> rel.above (A>B: this floor is above the car),
// rel.below (A<B), rel.here (A=B). FLOOR_ID sets A. No clock.
module floor_comparator
  import elevator_pkg::*;
#(
  parameter int unsigned FLOOR_W  = elevator_pkg::DEF_FLOOR_W,
  parameter int unsigned FLOOR_ID = 0
) (
  input  logic [FLOOR_W-1:0] cur_floor,
  output floor_rel_t         rel
);

  localparam logic [FLOOR_W-1:0] A = FLOOR_W'(FLOOR_ID);

  logic [FLOOR_W-1:0] gt_b, lt_b, eq_b;

  always_comb begin
    for (int k = 0; k < FLOOR_W; k++) begin
      gt_b[k] = A[k] & ~cur_floor[k];
      lt_b[k] = ~A[k] & cur_floor[k];
      eq_b[k] = (A[k] & cur_floor[k]) | (~A[k] & ~cur_floor[k]);
    end
  end

  // Resolve from the MSB: the first unequal bit pair decides.
  logic gt_w, lt_w, eq_w;
  always_comb begin
    gt_w = 1'b0;
    lt_w = 1'b0;
    eq_w = 1'b1;
    for (int k = FLOOR_W - 1; k >= 0; k--) begin
      gt_w = gt_w | (eq_w & gt_b[k]);
      lt_w = lt_w | (eq_w & lt_b[k]);
      eq_w = eq_w & eq_b[k];
    end
  end

  assign rel.above = gt_w;
  assign rel.below = lt_w;
  assign rel.here  = eq_w;

endmodule
