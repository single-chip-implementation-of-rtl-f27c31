// tb_round_select: checks the round index for every step number 0..79.
module tb_round_select;
  import sha1_pkg::*;
  step_t  t;
  round_e sel;
  int checks = 0, failures = 0;

  round_select dut (.t, .sel);

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 80; i++) begin
      t = 7'(i); #1;
      checks++;
      if (int'(sel) != i / 20) begin failures++; $display("t=%0d sel=%0d", i, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
