// tb_hash_control_unit: checks the control sequence cycle by cycle: one load,
// exactly 80 step cycles, one add cycle, busy, and that starts are ignored while
// busy or when the length is refused.
module tb_hash_control_unit;
  logic clk = 0, rst_n = 1, start = 0, len_ok = 1;
  logic load, step, add, busy;
  int checks = 0, failures = 0;

  hash_control_unit dut (.clk, .rst_n, .start, .len_ok, .load, .step, .add, .busy);

  always #5 clk = ~clk;

  task automatic expect_ctl(input logic l, input logic s, input logic a, input logic b,
                            input string what);
    checks++;
    if ({load, step, add, busy} !== {l, s, a, b}) begin
      failures++;
      $display("%s: load=%b step=%b add=%b busy=%b", what, load, step, add, busy);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    @(negedge clk);
    expect_ctl(0, 0, 0, 0, "idle");
    // refused start
    len_ok = 0; start = 1; #1;
    expect_ctl(0, 0, 0, 0, "refused start");
    @(negedge clk);
    expect_ctl(0, 0, 0, 0, "still idle after refused start");
    for (int n = 0; n < 3; n++) begin
      len_ok = 1; start = 1; #1;
      expect_ctl(1, 0, 0, 0, "load");
      @(negedge clk);
      start = (n == 1);   // a start held high while busy must be ignored
      for (int s = 0; s < 80; s++) begin
        expect_ctl(0, 1, 0, 1, $sformatf("step %0d", s));
        @(negedge clk);
      end
      expect_ctl(0, 0, 1, 1, "add");
      start = 0;
      @(negedge clk);
      expect_ctl(0, 0, 0, 0, "back to idle");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
