// tb_final_addition: random initial hash and internal values; checks the stored
// initial hash, the word-wise sum modulo 2^32, the done pulse and digest hold.
module tb_final_addition;
  import sha1_ref_pkg::*;
  logic clk = 0, rst_n = 1, load = 0, add = 0, done;
  logic [159:0] init_hash, internal, digest, expect_d;
  int checks = 0, failures = 0;

  final_addition dut (.clk, .rst_n, .load, .add, .init_hash, .internal, .digest, .done);

  always #5 clk = ~clk;

  function automatic logic [159:0] r160();
    return {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      init_hash = (n == 0) ? {5{32'hFFFFFFFF}} : r160(); load = 1;
      @(negedge clk); load = 0;
      expect_d = ref_add(init_hash, (n == 0) ? {5{32'h00000001}} : 160'h0);
      init_hash = r160();   // the port may change after load
      internal = (n == 0) ? {5{32'h00000001}} : r160();
      if (n != 0) expect_d = ref_add(expect_d, internal);
      checks++;
      if (done !== 1'b0) begin failures++; $display("done without add"); end
      add = 1; @(negedge clk); add = 0;
      checks++;
      if (done !== 1'b1 || digest !== expect_d) begin
        failures++; $display("sum wrong: %h expected %h", digest, expect_d);
      end
      internal = r160();
      @(negedge clk);
      checks++;
      if (done !== 1'b0 || digest !== expect_d) begin failures++; $display("no hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
