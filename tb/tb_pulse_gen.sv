// tb_pulse_gen: sample pulses must come every SAMPLE_DIV cycles and step
// pulses on every STEP_SAMPLES-th sample pulse, each one cycle wide.
module tb_pulse_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_tick, step_tick;

  localparam int DIV = 5, STEPS = 3;

  pulse_gen #(.SAMPLE_DIV(DIV), .STEP_SAMPLES(STEPS)) dut (
    .clk(clk), .rst_n(rst_n), .sample_tick(sample_tick), .step_tick(step_tick));

  always #5 clk = ~clk;

  int cyc = 0, last_sample = -1, last_step = -1, n_sample = 0, n_step = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (step_tick) begin
      checks++;
      if (!sample_tick) begin
        failures++; $display("FAIL: step pulse without sample pulse at %0d", cyc);
      end
    end
    if (sample_tick) begin
      if (last_sample >= 0) begin
        checks++;
        if (cyc - last_sample != DIV) begin
          failures++; $display("FAIL: sample period %0d", cyc - last_sample);
        end
      end
      last_sample <= cyc;
      n_sample <= n_sample + 1;
    end
    if (step_tick) begin
      if (last_step >= 0) begin
        checks++;
        if (cyc - last_step != DIV * STEPS) begin
          failures++; $display("FAIL: step period %0d", cyc - last_step);
        end
      end
      last_step <= cyc;
      n_step <= n_step + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (DIV * STEPS * 8) @(posedge clk);
    checks++;
    if (n_step < 7 || n_sample < 23) begin
      failures++; $display("FAIL: %0d sample and %0d step pulses", n_sample, n_step);
    end
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
