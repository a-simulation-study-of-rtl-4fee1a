// tb_floor_comparator: one comparator per floor of an eight-floor building;
// for every current floor, each comparator must report exactly one of
// above / below / here, matching an integer comparison.
module tb_floor_comparator;
  import elevator_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] cur;
  floor_rel_t rel [8];

  for (genvar f = 0; f < 8; f++) begin : g_cmp
    floor_comparator #(.FLOOR_W(3), .FLOOR_ID(f)) dut (.cur_floor(cur), .rel(rel[f]));
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      cur = 3'(c);
      #1;
      for (int f = 0; f < 8; f++) begin
        checks++;
        if (rel[f].above !== (f > c) || rel[f].below !== (f < c) || rel[f].here !== (f == c)) begin
          failures++;
          $display("FAIL: floor %0d vs current %0d: above=%b below=%b here=%b",
                   f, c, rel[f].above, rel[f].below, rel[f].here);
        end
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
