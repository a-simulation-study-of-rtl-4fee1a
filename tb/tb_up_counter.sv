// tb_up_counter: exhaustive check of the next-floor-up logic against the
// "add one" truth table for an eight-floor building (ground to 7th), plus
// the wrap of the top floor, which the controller never selects.
module tb_up_counter;
  int checks = 0, failures = 0;
  logic [2:0] fin, fout;

  // Expected outputs for inputs 0..7 (row 7 is the unused wrap).
  localparam logic [2:0] EXPECT [8] = '{3'b001, 3'b010, 3'b011, 3'b100,
                                        3'b101, 3'b110, 3'b111, 3'b000};

  up_counter #(.FLOOR_W(3)) dut (.floor_i(fin), .floor_o(fout));

  initial begin
    for (int i = 0; i < 8; i++) begin
      fin = 3'(i);
      #1;
      checks++;
      if (fout !== EXPECT[i]) begin
        failures++;
        $display("FAIL: up(%0d) = %0d, expected %0d", i, fout, EXPECT[i]);
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
