// mod80_counter: the step counter, counting 0, 1, ..., 79 and back to 0.
//
// `clear` sets it to 0 (it has priority); `en` advances it by one, wrapping from
// 79 to 0. Asynchronous active-low reset to 0. The 7-bit output is the step number
// t that selects the logic function and the round constant. The counter and its
// width come from the design; clear/enable control is this implementation's.
module mod80_counter
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  en,
  output step_t t
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      t <= '0;
    else if (clear)  t <= '0;
    else if (en)     t <= (t == step_t'(NUM_STEPS - 1)) ? '0 : t + 1'b1;
  end

endmodule
