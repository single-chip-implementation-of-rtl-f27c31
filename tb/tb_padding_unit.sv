// tb_padding_unit: checks the padded block and len_ok for edge and random lengths
// against a bit-by-bit reference.
module tb_padding_unit;
  import sha1_ref_pkg::*;

  logic [447:0] msg;
  logic [8:0]   msg_len;
  logic [511:0] block;
  logic         len_ok;
  int checks = 0, failures = 0;

  padding_unit dut (.msg, .msg_len, .block, .len_ok);

  task automatic try(input logic [447:0] m, input int len);
    msg = m; msg_len = 9'(len);
    #1;
    checks++;
    if (len_ok !== (len <= 447)) begin
      failures++; $display("len_ok wrong for len %0d", len);
    end
    if (len <= 447) begin
      checks++;
      if (block !== ref_pad(m, len)) begin
        failures++; $display("block wrong for len %0d: %h", len, block);
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // "abc": first word 61626380, length 24
    try({24'h616263, 424'h0}, 24);
    checks++;
    if (block[511:480] !== 32'h61626380 || block[63:0] !== 64'd24) begin
      failures++; $display("abc block wrong");
    end
    for (int len = 0; len < 512; len++) try(rand_msg(), len);
    for (int n = 0; n < 500; n++) try(rand_msg(), $urandom_range(0, 447));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
