// tb_call_distance_checker: all combinations of position and call bit; each
// output must be the position bit gated by the call bit.
module tb_call_distance_checker;
  import elevator_pkg::*;
  int checks = 0, failures = 0;
  floor_rel_t rel, call_rel;
  logic       call;

  call_distance_checker dut (.rel(rel), .call(call), .call_rel(call_rel));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {call, rel.above, rel.below, rel.here} = 4'(v);
      #1;
      checks++;
      if (call_rel.above !== (call && rel.above) || call_rel.below !== (call && rel.below)
          || call_rel.here !== (call && rel.here)) begin
        failures++;
        $display("FAIL: input %b -> %b", 4'(v), call_rel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
