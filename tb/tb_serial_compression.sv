// tb_serial_compression: loads an initial hash, feeds Wt, f and Kt for 80 steps
// (f computed from the block's own B, C, D outputs) and checks the registers after
// every step and the internal hash value at the end.
module tb_serial_compression;
  import sha1_ref_pkg::*;
  logic clk = 0, load = 0, step = 0;
  logic [159:0] init_hash, state, model;
  logic [31:0] ft, wt, kt;
  logic [511:0] blk;
  int checks = 0, failures = 0;
  int cur_t = 0;

  serial_compression dut (.clk, .load, .step, .init_hash, .ft, .wt, .kt, .state);

  always #5 clk = ~clk;

  assign ft = ref_f(cur_t, state[127:96], state[95:64], state[63:32]);
  assign wt = ref_w(blk, cur_t);
  assign kt = ref_k(cur_t);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      init_hash = (n == 0) ? std_iv() :
        {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
      blk = {rand_msg(), 32'($urandom), 32'($urandom)};
      cur_t = 0;
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      checks++;
      if (state !== init_hash) begin failures++; $display("load failed"); end
      model = init_hash;
      for (int t = 0; t < 80; t++) begin
        cur_t = t;
        model = ref_step(model, t, ref_w(blk, t), ref_k(t),
                         ref_f(t, model[127:96], model[95:64], model[63:32]));
        step = 1; @(negedge clk); step = 0;
        checks++;
        if (state !== model) begin failures++; $display("step %0d wrong", t); end
      end
      // no step: registers hold
      @(negedge clk);
      checks++;
      if (state !== ref_rounds(init_hash, blk)) begin
        failures++; $display("final internal hash wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
