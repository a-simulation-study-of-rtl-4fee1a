// tb_call_logic: the call half on its own, with the comparator floor driven
// by the testbench. Random switch presses and floor changes are checked
// against a reference model: a call is set by a press away from the car and
// cleared when the car is at the floor with the switch released; move and
// direction follow the selector rules from the pending calls.
module tb_call_logic;
  import elevator_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, tick = 0;
  logic [2:0] cmp_floor = 0;
  logic [7:0] call_sw = 0, calls;
  logic       move, any_above, any_below, any_here;
  dir_e       dir_sel, dir_q;

  call_logic #(.N_FLOORS(8), .FLUSH_DELAY(0), .INIT_DIR(DIR_UP)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .cmp_floor(cmp_floor), .call_sw(call_sw),
    .calls(calls), .move(move), .dir_sel(dir_sel), .dir_q(dir_q), .any_above(any_above),
    .any_below(any_below), .any_here(any_here));

  always #5 clk = ~clk;

  logic [7:0] m_calls;
  logic       m_dir, a, b, h, exp_dir, at;
  int         n_served = 0, n_set = 0;
  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    m_calls = '0;
    m_dir = 1'b1;
    for (int n = 0; n < 300; n++) begin
      // Change inputs, then give the XOR clock two cycles to act.
      call_sw = '0;
      if ($urandom_range(0, 2) == 0) call_sw[$urandom_range(0, 7)] = 1'b1;
      if ($urandom_range(0, 3) == 0) cmp_floor = 3'($urandom_range(0, 7));
      for (int f = 0; f < 8; f++) begin
        at = (cmp_floor == 3'(f));
        if (call_sw[f] && !at && !m_calls[f]) begin m_calls[f] = 1; n_set++; end
        if (!call_sw[f] && at && m_calls[f])  begin m_calls[f] = 0; n_served++; end
      end
      tick = 0;
      repeat (2) @(posedge clk);
      #1;
      a = 0; b = 0; h = 0;
      for (int f = 0; f < 8; f++) begin
        a |= m_calls[f] && (f > cmp_floor);
        b |= m_calls[f] && (f < cmp_floor);
        h |= m_calls[f] && (f == cmp_floor);
      end
      exp_dir = h ? m_dir : (a && !b) ? 1'b1 : (!a && b) ? 1'b0 : (a && b) ? m_dir : ~m_dir;
      checks++;
      if (calls !== m_calls || move !== ((a || b) && !h) || dir_sel !== dir_e'(exp_dir)
          || any_here !== h || dir_q !== dir_e'(m_dir)) begin
        failures++;
        $display("FAIL: step %0d floor=%0d calls=%b exp %b move=%b dir_sel=%b exp %b",
                 n, cmp_floor, calls, m_calls, move, dir_sel, exp_dir);
      end
      // one sample pulse: the direction memory stores its decision
      tick = 1;
      @(posedge clk);
      m_dir = exp_dir;
      #1;
      tick = 0;
    end
    checks++;
    if (n_set == 0 || n_served == 0) begin failures++; $display("FAIL: nothing set or served"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
