// tb_ft_generation: runs the counter through 80 steps (with pauses) twice and
// checks f(t,B,C,D) for random B, C, D at every step against a bit-wise reference.
module tb_ft_generation;
  import sha1_ref_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [31:0] b, c, d, ft;
  logic [6:0] t;
  int checks = 0, failures = 0;

  ft_generation dut (.clk, .rst_n, .clear, .en, .b, .c, .d, .ft, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int s = 0; s < 80; s++) begin
        for (int r = 0; r < 3; r++) begin
          b = $urandom; c = $urandom; d = $urandom; #1;
          checks++;
          if (ft !== ref_f(s, b, c, d) || int'(t) != s) begin
            failures++; $display("t=%0d/%0d ft=%h expected %h", t, s, ft, ref_f(s, b, c, d));
          end
        end
        en = ($urandom_range(0, 4) != 0);
        if (!en) begin @(negedge clk); en = 1; end
        @(negedge clk); en = 0;
      end
      checks++;
      if (t != 0) begin failures++; $display("no wrap to 0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
