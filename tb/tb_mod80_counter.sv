// tb_mod80_counter: checks reset, counting 0..79 with wrap, hold with en low,
// and clear priority.
module tb_mod80_counter;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [6:0] t;
  int checks = 0, failures = 0;
  int model = 0;

  mod80_counter dut (.clk, .rst_n, .clear, .en, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(t) != model) begin failures++; $display("t=%0d expected %0d", t, model); end
      clear = ($urandom_range(0, 99) == 0);
      en    = ($urandom_range(0, 9) != 0);
      if (clear) model = 0;
      else if (en) model = (model + 1) % 80;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
