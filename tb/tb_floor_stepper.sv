// tb_floor_stepper: random move/direction selects and load pulses against a
// model of the stepping loop: next floor = floor, floor+1 or floor-1; the
// floor register takes it on a step pulse, the comparator register copies
// the floor register on a sample pulse.
module tb_floor_stepper;
  import elevator_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, step_load = 0, sample_load = 0, move = 0;
  dir_e       dir_sel = DIR_UP;
  logic [2:0] floor_q, cmp_floor, next_floor;

  floor_stepper #(.N_FLOORS(8), .INIT_FLOOR(3)) dut (
    .clk(clk), .rst_n(rst_n), .step_load(step_load), .sample_load(sample_load),
    .dir_sel(dir_sel), .move(move), .floor_q(floor_q), .cmp_floor(cmp_floor),
    .next_floor(next_floor));

  always #5 clk = ~clk;

  logic [2:0] m_floor, m_cmp, m_next;
  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (floor_q !== 3 || cmp_floor !== 3) begin failures++; $display("FAIL: reset floor"); end
    rst_n = 1;
    m_floor = 3; m_cmp = 3;
    for (int n = 0; n < 500; n++) begin
      move        = 1'($urandom_range(0, 1));
      dir_sel     = dir_e'($urandom_range(0, 1));
      step_load   = 1'($urandom_range(0, 3) == 0);
      sample_load = step_load | 1'($urandom_range(0, 1));
      #1;
      m_next = !move ? m_floor : (dir_sel == DIR_UP) ? m_floor + 3'd1 : m_floor - 3'd1;
      checks++;
      if (next_floor !== m_next) begin
        failures++; $display("FAIL: next_floor %0d expected %0d", next_floor, m_next);
      end
      @(posedge clk);
      if (sample_load) m_cmp = m_floor;
      if (step_load)   m_floor = m_next;
      #1;
      checks++;
      if (floor_q !== m_floor || cmp_floor !== m_cmp) begin
        failures++;
        $display("FAIL: floor %0d/%0d cmp %0d/%0d", floor_q, m_floor, cmp_floor, m_cmp);
      end
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
