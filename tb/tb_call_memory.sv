// tb_call_memory: the call bit of one floor, without and with a serving
// delay. Without delay it must follow the call-generator table (set by a
// press away from the floor, flushed at the floor once the switch is
// released, held otherwise) and must not be set by the car passing the
// floor. With a delay of 3 sample pulses, setting and flushing must happen
// on the third sample pulse after the event and not earlier, and a press of
// a single clock cycle between pulses must not be lost.
module tb_call_memory;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0;
  logic eq0 = 0, sw0 = 0, call0;
  logic eq3 = 0, sw3 = 0, call3;

  call_memory #(.FLUSH_DELAY(0)) dut0 (
    .clk(clk), .rst_n(rst_n), .tick(tick), .at_floor(eq0), .call_sw(sw0), .call(call0));
  call_memory #(.FLUSH_DELAY(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .tick(tick), .at_floor(eq3), .call_sw(sw3), .call(call3));

  always #5 clk = ~clk;

  // Sample pulse: one cycle in every four.
  int cyc = 0;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= ((cyc % 4) == 3);
  end

  task automatic expect0(input logic exp, input string what);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (call0 !== exp) begin
      failures++;
      $display("FAIL (no delay): %s: call=%b expected %b", what, call0, exp);
    end
  endtask

  // Number of sample pulses until call3 equals exp (gives up after 10).
  task automatic ticks_until3(input logic exp, output int n);
    n = 0;
    while (call3 !== exp && n < 10) begin
      @(posedge clk);
      if (tick) n++;
      #1;
    end
    // the flip-flop updates one cycle after the pulse that delivers the edge
    @(posedge clk); #1;
    if (call3 !== exp) n = 99;
  endtask

  int n;
  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (call0 !== 0 || call3 !== 0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;

    // ---- no delay: call-generator table ----
    sw0 = 1; eq0 = 0; expect0(1, "press away from floor sets call");
    sw0 = 0;          expect0(1, "switch released, call held");
    eq0 = 1;          expect0(0, "arrival flushes call");
    sw0 = 1;          expect0(0, "press at floor, call stays clear");
    sw0 = 0;          expect0(0, "release at floor, call stays clear");
    eq0 = 0;          expect0(0, "car leaves, no call");
    eq0 = 1;          expect0(0, "car passes floor, no phantom call");
    eq0 = 0;          expect0(0, "car passes floor, no phantom call");
    sw0 = 1; eq0 = 1; expect0(0, "press while car at floor");
    eq0 = 0;          expect0(1, "car leaves with switch held, call set");
    sw0 = 0;          expect0(1, "call held after release");
    sw0 = 1; eq0 = 1; expect0(1, "arrival with switch held keeps call");
    sw0 = 0;          expect0(0, "release at floor flushes");

    // ---- delay of 3 sample pulses ----
    @(posedge clk); while (!tick) @(posedge clk);
    @(posedge clk); #1;
    sw3 = 1; @(posedge clk); #1; sw3 = 0;   // one-cycle press between pulses
    ticks_until3(1, n);
    checks++;
    if (n != 3) begin failures++; $display("FAIL (delay): call set after %0d pulses, expected 3", n); end
    repeat (20) @(posedge clk); #1;
    checks++;
    if (call3 !== 1) begin failures++; $display("FAIL (delay): call not held"); end
    eq3 = 1;                                  // car arrives
    ticks_until3(0, n);
    checks++;
    if (n != 3) begin failures++; $display("FAIL (delay): call flushed after %0d pulses, expected 3", n); end
    eq3 = 0;
    repeat (12) @(posedge clk); #1;
    eq3 = 1; repeat (8) @(posedge clk); #1; eq3 = 0;  // car passes
    repeat (40) @(posedge clk); #1;
    checks++;
    if (call3 !== 0) begin failures++; $display("FAIL (delay): phantom call after passing"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
