// tb_floor_mux: exhaustive check of the two-way floor selector over all
// select values and input pairs.
module tb_floor_mux;
  int checks = 0, failures = 0;
  logic       sel;
  logic [2:0] in0, in1, out;

  floor_mux #(.FLOOR_W(3)) dut (.sel(sel), .in0(in0), .in1(in1), .out(out));

  initial begin
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          sel = 1'(s); in0 = 3'(a); in1 = 3'(b);
          #1;
          checks++;
          if (out !== (s ? 3'(b) : 3'(a))) begin
            failures++;
            $display("FAIL: sel=%0d in0=%0d in1=%0d out=%0d", s, a, b, out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
