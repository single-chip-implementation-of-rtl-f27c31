// step_function: one SHA-1 step (round function), combinational.
//
// From the current words A..E, the logic function value f, the message word Wt
// and the constant Kt it forms
//   A' = E + f + ROTL5(A) + Wt + Kt   (modulo 2^32)
//   B' = A,  C' = ROTL30(B),  D' = C,  E' = D.
// The four additions are chained in the order E+f, +ROTL5(A), +Wt, +Kt, as the
// design draws the step. No clock: the register stacks around it live in
// serial_compression.
module step_function
  import sha1_pkg::*;
(
  input  hash_t cur,
  input  word_t ft,
  input  word_t wt,
  input  word_t kt,
  output hash_t nxt
);

  word_t sum_f, sum_a, sum_w;

  always_comb begin
    sum_f = cur.e + ft;
    sum_a = sum_f + rotl(cur.a, 5);
    sum_w = sum_a + wt;
    nxt.a = sum_w + kt;
    nxt.b = cur.a;
    nxt.c = rotl(cur.b, 30);
    nxt.d = cur.c;
    nxt.e = cur.d;
  end

endmodule
