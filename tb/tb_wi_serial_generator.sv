// tb_wi_serial_generator: loads random blocks and checks W0..W79, one per step,
// against the full 80-word schedule; also checks that the word holds without step.
module tb_wi_serial_generator;
  import sha1_ref_pkg::*;

  logic clk = 0, load = 0, step = 0;
  logic [511:0] block;
  logic [31:0] wt;
  int checks = 0, failures = 0;

  wi_serial_generator dut (.clk, .load, .step, .block, .wt);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      block = {rand_msg(), 32'($urandom), 32'($urandom)};
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int t = 0; t < 80; t++) begin
        checks++;
        if (wt !== ref_w(block, t)) begin
          failures++; $display("W%0d = %h, expected %h", t, wt, ref_w(block, t));
        end
        // sometimes pause a cycle: the word must hold
        if ($urandom_range(0, 3) == 0) begin
          step = 0; @(negedge clk);
          checks++;
          if (wt !== ref_w(block, t)) begin failures++; $display("W%0d not held", t); end
        end
        step = 1; @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
