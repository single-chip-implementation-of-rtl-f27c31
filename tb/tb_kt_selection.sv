// tb_kt_selection: runs the counter through 80 steps (with pauses) and checks Kt
// at every step against the constant table.
module tb_kt_selection;
  import sha1_ref_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [31:0] kt;
  logic [6:0] t;
  int checks = 0, failures = 0;

  kt_selection dut (.clk, .rst_n, .clear, .en, .kt, .t);

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
        checks++;
        if (kt !== ref_k(s) || int'(t) != s) begin
          failures++; $display("t=%0d/%0d kt=%h expected %h", t, s, kt, ref_k(s));
        end
        en = ($urandom_range(0, 4) != 0);
        if (!en) begin @(negedge clk); en = 1; end
        @(negedge clk); en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
