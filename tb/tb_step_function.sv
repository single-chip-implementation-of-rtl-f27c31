// tb_step_function: random operands, next state compared with the reference step.
module tb_step_function;
  import sha1_ref_pkg::*;
  logic [159:0] cur, nxt;
  logic [31:0] ft, wt, kt;
  int checks = 0, failures = 0;

  step_function dut (.cur, .ft, .wt, .kt, .nxt);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      cur = {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
      ft = $urandom; wt = $urandom; kt = $urandom;
      #1;
      checks++;
      if (nxt !== ref_step(cur, 0, wt, kt, ft)) begin
        failures++; $display("step wrong: %h", nxt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
