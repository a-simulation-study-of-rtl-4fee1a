// tb_mux_selector_gen: random per-floor call positions against a reference
// model of the selector rules: move when a call lies above or below and none
// is at the car; keep the stored direction while a call at the car is
// served, otherwise go up for calls only above, down for calls only below,
// keep it for calls on both sides and reverse it when there are none; store the decision on each load pulse.
module tb_mux_selector_gen;
  import elevator_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, load = 0;
  floor_rel_t call_rel [8];
  logic       move, any_above, any_below, any_here;
  dir_e       dir_sel, dir_q;

  mux_selector_gen #(.N_FLOORS(8), .INIT_DIR(DIR_UP)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .call_rel(call_rel), .move(move),
    .dir_sel(dir_sel), .dir_q(dir_q), .any_above(any_above), .any_below(any_below),
    .any_here(any_here));

  always #5 clk = ~clk;

  logic m_dir, a, b, h, exp_dir;
  int   n_keep = 0, n_rev = 0, r;
  initial begin
    foreach (call_rel[f]) call_rel[f] = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    m_dir = 1'b1;
    for (int n = 0; n < 400; n++) begin
      // sparse random calls so every case occurs
      foreach (call_rel[f]) begin
        r = $urandom_range(0, 11);
        call_rel[f] = (r == 0) ? 3'b100 : (r == 1) ? 3'b010 : (r == 2) ? 3'b001 : 3'b000;
      end
      load = 1'($urandom_range(0, 1));
      #1;
      a = 0; b = 0; h = 0;
      foreach (call_rel[f]) begin
        a |= call_rel[f].above; b |= call_rel[f].below; h |= call_rel[f].here;
      end
      exp_dir = h ? m_dir : (a && !b) ? 1'b1 : (!a && b) ? 1'b0 : (a && b) ? m_dir : ~m_dir;
      if (a && b) n_keep++;
      if (!a && !b && !h) n_rev++;
      checks++;
      if (any_above !== a || any_below !== b || any_here !== h || move !== ((a || b) && !h)
          || dir_sel !== dir_e'(exp_dir) || dir_q !== dir_e'(m_dir)) begin
        failures++;
        $display("FAIL: step %0d a=%b b=%b h=%b move=%b dir_sel=%b (exp %b) dir_q=%b (exp %b)",
                 n, a, b, h, move, dir_sel, exp_dir, dir_q, m_dir);
      end
      @(posedge clk);
      if (load) m_dir = exp_dir;
      #1;
    end
    checks++;
    if (n_keep == 0 || n_rev == 0) begin failures++; $display("FAIL: cases not covered"); end
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
