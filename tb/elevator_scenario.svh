// elevator_scenario.svh: end-to-end scenario for elevator_top, shared by the
// reduced-size and the full-size testbench. The including module declares
// STEP_CYCLES (clock cycles per floor step), STEP_SAMPLES, FLUSH_DELAY, the
// DUT signals and the DUT.
//
// Scenario (car starts idle at the ground floor, direction up):
//   1. idle: the car must stay at floor 0 while its direction sweeps;
//   2. a call at floor 5: the car climbs one floor per step and stops there;
//   3. while floor 5 is being served, calls at 2 and 7 arrive together: the
//      car keeps going up, serves 7, turns round and heads for 2;
//   4. on the way down, at floor 4, a call at 6 arrives: the car keeps going
//      down to 2 first, then turns round and serves 6.
// Expected service order: 5, 7, 2, 6.
// Throughout, a monitor checks that the floor changes only on a step pulse
// and by one floor, that a call is flushed only with the car at that floor,
// and that the car never stands still with calls pending unless it is
// serving one. It also checks the rate: the car leaves a floor it only passes
// exactly one step period after arriving, and a served floor exactly
// DWELL_STEPS step periods after arriving. It counts how often each mechanism
// occurred.

  int checks = 0, failures = 0;

  // ---- mechanism counters ----
  int n_up = 0, n_down = 0, n_serve = 0, n_dwell = 0, n_keep_dir = 0;
  int n_turn = 0, n_idle_sweep = 0, n_pass = 0;

  // Steps spent at a served floor: the comparators see the floor one sample
  // pulse after arrival, the flush follows FLUSH_DELAY pulses later, and the
  // car leaves on the first step pulse after that.
  localparam int DWELL_STEPS = (1 + FLUSH_DELAY) / STEP_SAMPLES + 1;

  int   cyc = 0, last_change = -1;
  logic arrived_called = 1'b0;

  int served_order [$];
  logic [2:0] prev_floor;
  logic [7:0] prev_calls;
  dir_e       prev_dir;
  logic       prev_step;
  logic       monitor_on = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (monitor_on) begin
      // Values read here are those before this edge's updates.
      if (floor != prev_floor) begin
        if (last_change >= 0) begin
          checks++;
          if (cyc - last_change != (arrived_called ? DWELL_STEPS : 1) * STEP_CYCLES) begin
            failures++;
            $display("FAIL: left floor %0d after %0d cycles, expected %0d", prev_floor,
                     cyc - last_change, (arrived_called ? DWELL_STEPS : 1) * STEP_CYCLES);
          end
        end
        last_change    <= cyc;
        arrived_called <= calls[floor];
        checks++;
        if (!prev_step || !(floor == prev_floor + 3'd1 || floor == prev_floor - 3'd1)) begin
          failures++;
          $display("FAIL: floor %0d -> %0d (step pulse %b)", prev_floor, floor, prev_step);
        end
        if (floor == prev_floor + 3'd1) n_up++; else n_down++;
        if (!calls[floor]) n_pass++;
      end
      for (int f = 0; f < 8; f++) begin
        if (prev_calls[f] && !calls[f]) begin
          checks++;
          n_serve++;
          served_order.push_back(f);
          if (floor != 3'(f)) begin
            failures++;
            $display("FAIL: call %0d flushed with the car at %0d", f, floor);
          end
        end
      end
      if (step_tick) begin
        if (calls != 0 && !moving) begin
          checks++;
          if (serving) n_dwell++;
          else begin
            failures++;
            $display("FAIL: car stands at %0d with calls %b pending", floor, calls);
          end
        end
      end
      if (sample_tick && call_above && call_below) n_keep_dir++;
      if (dir != prev_dir) begin
        if (calls == 0) n_idle_sweep++;
        else            n_turn++;
      end
    end
    prev_floor <= floor;
    prev_calls <= calls;
    prev_dir   <= dir;
    prev_step  <= step_tick;
  end

  task automatic press(input int f);
    call_sw[f] = 1'b1;
    repeat (3) @(posedge clk);
    call_sw[f] = 1'b0;
  endtask

  task automatic wait_floor(input int f, input int max_steps);
    int n = 0;
    while (floor != 3'(f) && n < max_steps * STEP_CYCLES) begin
      @(posedge clk);
      n++;
    end
    checks++;
    if (floor != 3'(f)) begin
      failures++;
      $display("FAIL: car did not reach floor %0d (at %0d)", f, floor);
    end
  endtask

  task automatic wait_served(input int f, input int max_steps);
    int n = 0;
    while (calls[f] && n < max_steps * STEP_CYCLES) begin
      @(posedge clk);
      n++;
    end
    checks++;
    if (calls[f]) begin
      failures++;
      $display("FAIL: call at %0d not served", f);
    end
  endtask

  initial begin
    call_sw = '0;
    rst_n   = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    monitor_on = 1'b1;

    // 1. idle
    repeat (4 * STEP_CYCLES) @(posedge clk);
    checks++;
    if (floor != 0) begin failures++; $display("FAIL: idle car moved to %0d", floor); end

    // 2. call at 5
    press(5);
    wait_floor(5, 8);
    // 3. calls at 2 and 7 while 5 is still being served
    checks++;
    if (!calls[5]) begin failures++; $display("FAIL: call 5 flushed before the car stood there"); end
    call_sw[2] = 1'b1;
    press(7);
    call_sw[2] = 1'b0;
    wait_served(5, 6);
    wait_served(7, 10);
    // 4. call at 6 on the way down, at floor 4
    wait_floor(4, 10);
    press(6);
    wait_served(2, 10);
    wait_served(6, 12);
    repeat (4 * STEP_CYCLES) @(posedge clk);

    // service order
    checks++;
    if (served_order.size() != 4 || served_order[0] != 5 || served_order[1] != 7
        || served_order[2] != 2 || served_order[3] != 6) begin
      failures++;
      $display("FAIL: service order %p, expected 5 7 2 6", served_order);
    end
    // final position
    checks++;
    if (floor != 6 || calls != 0) begin
      failures++; $display("FAIL: ends at %0d with calls %b", floor, calls);
    end

    // every mechanism must have occurred
    $display("mechanisms: up=%0d down=%0d serve=%0d dwell=%0d keep_dir=%0d turn=%0d idle_sweep=%0d pass=%0d",
             n_up, n_down, n_serve, n_dwell, n_keep_dir, n_turn, n_idle_sweep, n_pass);
    checks++;
    if (n_up == 0 || n_down == 0 || n_serve == 0 || n_dwell == 0 || n_keep_dir == 0
        || n_turn == 0 || n_idle_sweep == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    // climbing 0->5 and 5->7, then 7->2 and 2->6 in single-floor steps
    checks++;
    if (n_up != 11 || n_down != 5) begin
      failures++; $display("FAIL: %0d floors up, %0d down, expected 11 and 5", n_up, n_down);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80 * STEP_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
