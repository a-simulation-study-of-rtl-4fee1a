// call_distance_checker: combines a floor's position with its call bit.
//
// Three AND gates per floor. Each gates one comparator output with the
// floor's call bit, so the result says both that the floor has a pending call
// and where it lies: above the car, below the car or at the car. All three
// are 0 when the floor has no call.
//
// This stage follows the original design exactly.
//
// Interface: rel (comparator outputs), call (call bit) -> call_rel. No clock.
module call_distance_checker
  import elevator_pkg::*;
(
  input  floor_rel_t rel,
  input  logic       call,
  output floor_rel_t call_rel
);

  assign call_rel.above = rel.above & call;
  assign call_rel.below = rel.below & call;
  assign call_rel.here  = rel.here  & call;

endmodule
