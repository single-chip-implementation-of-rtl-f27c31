// serial_compression: the serial SHA-1 compression function, one step per clock.
//
// Five 32-bit registers ("register stacks") hold A..E. A multiplexer in front of
// them selects the initial hash input when `load` is high (the cycle before step
// 0) and the step-function output otherwise; the registers update on `load` or
// `step`. After the load and 80 steps, `state` is the internal hash value that
// the final addition adds to the initial hash. The function value f and the
// constant Kt come from outside (ft_generation, kt_selection), and so does Wt
// (wi_serial_generator); `state` feeds B, C, D back to ft_generation.
// Structure after the design; the separate load cycle is this implementation's.
module serial_compression
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  logic  step,
  input  hash_t init_hash,
  input  word_t ft,
  input  word_t wt,
  input  word_t kt,
  output hash_t state
);

  hash_t nxt;
  hash_t mux_out;

  step_function u_step (.cur(state), .ft, .wt, .kt, .nxt);

  assign mux_out = load ? init_hash : nxt;

  always_ff @(posedge clk) begin
    if (load || step) state <= mux_out;
  end

endmodule
