// sha1_serial_top: serial-structure SHA-1 core for one-block messages.
//
// The message (up to 447 bits, first bit at msg[447]) is padded into a 512-bit
// block. On an accepted `start` the block goes into the serial W generator, the
// initial hash input into the five compression registers and into the final
// adder, and the two module-80 counters of the function and constant selection
// are cleared. Then 80 clocks each perform one step, with Wt, f(t,B,C,D) and Kt
// for that step, and one further clock adds the initial hash to the result.
//
// Timing: `start` is sampled on a rising edge; `done` is high for one cycle 81
// cycles later, with `digest` valid from then until the next operation ends. A
// new start is accepted once `busy` is low again, i.e. one hash per 82 cycles.
// `len_error` is high while msg_len exceeds 447; a start is then ignored.
// For standard SHA-1 drive init_hash with sha1_pkg::SHA1_IV.
//
// The block structure (padding unit, Wi serial generator, Ft and Kt selection,
// serial compression, control unit, final addition, initial hash as an input)
// follows the design; timing, handshake and length check are this
// implementation's.
module sha1_serial_top
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [MSG_BITS-1:0] msg,
  input  logic [$clog2(MSG_BITS+1)-1:0] msg_len,
  input  hash_t        init_hash,
  output logic         busy,
  output logic         len_error,
  output logic         done,
  output hash_t        digest
);

  logic [511:0] block;
  logic         len_ok;
  logic         load, step, add;
  word_t        wt, ft, kt;
  step_t        t_f, t_k;
  hash_t        state;

  padding_unit #(.MSG_BITS(MSG_BITS)) u_pad (
    .msg, .msg_len, .block, .len_ok
  );

  hash_control_unit u_ctrl (
    .clk, .rst_n, .start, .len_ok, .load, .step, .add, .busy
  );

  wi_serial_generator u_w (
    .clk, .load, .step, .block, .wt
  );

  ft_generation u_f (
    .clk, .rst_n, .clear(load), .en(step),
    .b(state.b), .c(state.c), .d(state.d), .ft, .t(t_f)
  );

  kt_selection u_k (
    .clk, .rst_n, .clear(load), .en(step), .kt, .t(t_k)
  );

  serial_compression u_comp (
    .clk, .load, .step, .init_hash, .ft, .wt, .kt, .state
  );

  final_addition u_add (
    .clk, .rst_n, .load, .add, .init_hash, .internal(state), .digest, .done
  );

  assign len_error = !len_ok;

  // The function and constant selections keep separate step counters; they
  // must always agree.
  a_counters_agree: assert property (@(posedge clk) disable iff (!rst_n) t_f == t_k);

endmodule
