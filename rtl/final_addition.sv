// final_addition: the 160-bit final output addition.
//
// On `load` it stores the initial hash input of the operation. On `add` it adds
// that value, word by word modulo 2^32, to the internal hash value left by the
// 80 steps and registers the result as `digest`; `done` is high for the one
// cycle after, when the new digest appears. The digest holds until the next add.
// The word-wise addition is SHA-1's; storing the initial hash and the registered
// output with its done pulse are this implementation's choices.
module final_addition
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  add,
  input  hash_t init_hash,
  input  hash_t internal,
  output hash_t digest,
  output logic  done
);

  hash_t iv_q;
  hash_t sum;

  always_comb begin
    sum.a = iv_q.a + internal.a;
    sum.b = iv_q.b + internal.b;
    sum.c = iv_q.c + internal.c;
    sum.d = iv_q.d + internal.d;
    sum.e = iv_q.e + internal.e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv_q   <= '0;
      digest <= '0;
      done   <= 1'b0;
    end else begin
      if (load) iv_q <= init_hash;
      if (add)  digest <= sum;
      done <= add;
    end
  end

endmodule
