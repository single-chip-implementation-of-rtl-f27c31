// ft_generation: the logic function f(t,B,C,D) for the current step.
//
// Four function units compute, from the internal hash words B, C and D, the
// choice function (B&C)|(~B&D), the parity B^C^D, the majority
// (B&C)|(B&D)|(C&D) and the parity again. A 32-bit 4:1 multiplexer picks the
// one for the current round. Its select comes from round_select, driven by this
// block's own module-80 counter, which the control unit clears at the load cycle
// and advances with each step. `ft` is combinational from B, C, D and the
// registered counter; `t` exposes the counter.
// The structure (counter, selection generator, 4:1 mux) follows the design.
module ft_generation
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  en,
  input  word_t b,
  input  word_t c,
  input  word_t d,
  output word_t ft,
  output step_t t
);

  round_e sel;
  word_t  f_in [4];

  mod80_counter u_cnt (.clk, .rst_n, .clear, .en, .t);
  round_select  u_sel (.t, .sel);

  assign f_in[0] = f_ch(b, c, d);
  assign f_in[1] = f_parity(b, c, d);
  assign f_in[2] = f_maj(b, c, d);
  assign f_in[3] = f_parity(b, c, d);

  assign ft = f_in[sel];

endmodule
