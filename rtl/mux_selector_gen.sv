// mux_selector_gen: turns the per-floor call positions into the two
// multiplexer selects and keeps the direction of travel.
//
// Three N-input OR gates merge the per-floor results into "a call above",
// "a call below" and "a call here". The car moves (MUX#2 select = 1) when a
// call lies above or below, except while a call at the current floor is
// being served: the car then stands until that call is flushed.
// The direction (MUX#1 select, 1 = up) is:
//   a call here           -> keep the stored direction while it is served
//   else call above only  -> up
//   call below only       -> down
//   calls above and below -> keep the stored direction
//   no call at all        -> reverse the stored direction, so an idle car
//                            keeps sweeping both ways looking for calls
// The stored direction lives in a storage_reg and is updated on each load
// pulse (the sample pulse). dir_sel is the value being decided now, so
// MUX#1 already points the right way before it is stored.
//
// The OR trees, the keep-direction rule for calls on both sides and the
// idle reversal follow the original design. Using OR (not AND) for the move
// select, standing while a call here is served and freezing the direction
// meanwhile are this design's own choices, needed for the car to stop at
// called floors and to finish one side before turning.
//
// Interface: clk, rst_n (direction resets to INIT_DIR), load, call_rel[N]
// -> move, dir_sel, dir_q, any_above, any_below, any_here.
module mux_selector_gen
  import elevator_pkg::*;
#(
  parameter int unsigned N_FLOORS = elevator_pkg::DEF_N_FLOORS,
  parameter dir_e        INIT_DIR = DIR_UP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  floor_rel_t call_rel [N_FLOORS],
  output logic       move,
  output dir_e       dir_sel,
  output dir_e       dir_q,
  output logic       any_above,
  output logic       any_below,
  output logic       any_here
);

  // Eight-input (N-input) ORs.
  always_comb begin
    any_above = 1'b0;
    any_below = 1'b0;
    any_here  = 1'b0;
    for (int f = 0; f < int'(N_FLOORS); f++) begin
      any_above |= call_rel[f].above;
      any_below |= call_rel[f].below;
      any_here  |= call_rel[f].here;
    end
  end

  // MUX#2 select: leave the floor only when there is somewhere to go and
  // nothing left to serve here.
  assign move = (any_above | any_below) & ~any_here;

  always_comb begin
    if (any_here) begin
      dir_sel = dir_q;
    end else begin
      unique case ({any_above, any_below})
        2'b10:   dir_sel = DIR_UP;
        2'b01:   dir_sel = DIR_DOWN;
        2'b11:   dir_sel = dir_q;
        default: dir_sel = dir_e'(~dir_q);
      endcase
    end
  end

  // Direction memory.
  logic dir_bit;
  storage_reg #(.WIDTH(1), .RESET_VAL(INIT_DIR)) u_dir_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    (dir_sel),
    .q    (dir_bit)
  );
  assign dir_q = dir_e'(dir_bit);

endmodule
