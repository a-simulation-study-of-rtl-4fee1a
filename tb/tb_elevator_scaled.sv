// tb_elevator_scaled: the controller with other floor counts than eight, to
// check that the design scales: a 16-floor building (4-bit floor number) and
// a 6-floor building (3-bit floor number with unused codes). In each, the
// car starts idle at the ground floor; a call at the second-highest floor is
// made, and while it is served, calls at the top floor and at floor 2 arrive
// together. The expected service order is second-highest, top, 2, and the
// floor must change by one floor per step and never leave the building.
module tb_elevator_scaled;
  import elevator_pkg::*;

  localparam int SAMPLE_DIV = 2, STEP_SAMPLES = 4, FLUSH_DELAY = 4;
  localparam int STEP_CYCLES = SAMPLE_DIV * STEP_SAMPLES;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---- 16 floors ----
  logic [15:0] sw16 = '0, calls16;
  logic [3:0]  floor16, next16;
  dir_e        dir16;
  logic        mv16, sv16, ab16, bl16, st16, sp16;

  elevator_top #(.N_FLOORS(16), .SAMPLE_DIV(SAMPLE_DIV), .STEP_SAMPLES(STEP_SAMPLES),
                 .FLUSH_DELAY(FLUSH_DELAY)) dut16 (
    .clk(clk), .rst_n(rst_n), .call_sw(sw16), .floor(floor16), .next_floor(next16),
    .calls(calls16), .dir(dir16), .moving(mv16), .serving(sv16), .call_above(ab16),
    .call_below(bl16), .sample_tick(st16), .step_tick(sp16));

  // ---- 6 floors ----
  logic [5:0] sw6 = '0, calls6;
  logic [2:0] floor6, next6;
  dir_e       dir6;
  logic       mv6, sv6, ab6, bl6, st6, sp6;

  elevator_top #(.N_FLOORS(6), .SAMPLE_DIV(SAMPLE_DIV), .STEP_SAMPLES(STEP_SAMPLES),
                 .FLUSH_DELAY(FLUSH_DELAY)) dut6 (
    .clk(clk), .rst_n(rst_n), .call_sw(sw6), .floor(floor6), .next_floor(next6),
    .calls(calls6), .dir(dir6), .moving(mv6), .serving(sv6), .call_above(ab6),
    .call_below(bl6), .sample_tick(st6), .step_tick(sp6));

  // ---- monitors: one-floor steps, range, service order ----
  int order16 [$], order6 [$];
  logic [3:0]  pf16;  logic [15:0] pc16;
  logic [2:0]  pf6;   logic [5:0]  pc6;
  always @(posedge clk) begin
    if (rst_n) begin
      if (floor16 != pf16) begin
        checks++;
        if (!(floor16 == pf16 + 4'd1 || floor16 == pf16 - 4'd1)) begin
          failures++; $display("FAIL (16): floor %0d -> %0d", pf16, floor16);
        end
      end
      if (floor6 != pf6) begin
        checks++;
        if (!(floor6 == pf6 + 3'd1 || floor6 == pf6 - 3'd1) || floor6 > 3'd5) begin
          failures++; $display("FAIL (6): floor %0d -> %0d", pf6, floor6);
        end
      end
      for (int f = 0; f < 16; f++) if (pc16[f] && !calls16[f]) order16.push_back(f);
      for (int f = 0; f < 6; f++)  if (pc6[f]  && !calls6[f])  order6.push_back(f);
    end
    pf16 <= floor16; pc16 <= calls16;
    pf6  <= floor6;  pc6  <= calls6;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    repeat (2 * STEP_CYCLES) @(posedge clk);
    #1;
    // call at the second-highest floor
    sw16[14] = 1; sw6[4] = 1;
    repeat (3) @(posedge clk); #1;
    sw16[14] = 0; sw6[4] = 0;
    // wait until each car stands at it, then call top and floor 2 together
    fork
      begin
        while (floor16 != 4'd14) @(posedge clk);
        #1; sw16[15] = 1; sw16[2] = 1;
        repeat (3) @(posedge clk); #1;
        sw16[15] = 0; sw16[2] = 0;
      end
      begin
        while (floor6 != 3'd4) @(posedge clk);
        #1; sw6[5] = 1; sw6[2] = 1;
        repeat (3) @(posedge clk); #1;
        sw6[5] = 0; sw6[2] = 0;
      end
    join
    repeat (40 * STEP_CYCLES) @(posedge clk);

    checks++;
    if (order16.size() != 3 || order16[0] != 14 || order16[1] != 15 || order16[2] != 2) begin
      failures++; $display("FAIL (16): service order %p, expected 14 15 2", order16);
    end
    checks++;
    if (order6.size() != 3 || order6[0] != 4 || order6[1] != 5 || order6[2] != 2) begin
      failures++; $display("FAIL (6): service order %p, expected 4 5 2", order6);
    end
    checks++;
    if (floor16 != 4'd2 || floor6 != 3'd2 || calls16 != 0 || calls6 != 0) begin
      failures++; $display("FAIL: end floors %0d / %0d", floor16, floor6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120 * STEP_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
