// tb_storage_reg: random load/hold sequence on the parallel-load register;
// the output must equal the last word loaded (or the reset value) and must
// change only one clock edge after a load pulse.
module tb_storage_reg;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, load = 0;
  logic [3:0] d = 0, q, model;

  storage_reg #(.WIDTH(4), .RESET_VAL(4'hA)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 4'hA) begin failures++; $display("FAIL: reset value %h", q); end
    rst_n = 1;
    model = 4'hA;
    for (int n = 0; n < 200; n++) begin
      load = 1'($urandom_range(0, 2) == 0);
      d    = 4'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: cycle %0d q=%h expected %h", n, q, model);
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
