// kt_selection: the additive constant Kt for the current step.
//
// A 32-bit 4:1 multiplexer picks one of the four SHA-1 round constants
// 5A827999, 6ED9EBA1, 8F1BBCDC and CA62C1D6, one per 20 steps. The select comes
// from round_select, driven by this block's own module-80 counter, cleared by the
// control unit at the load cycle and advanced with each step. `kt` is
// combinational from the registered counter; `t` exposes the counter.
// Structure and constants follow the design.
module kt_selection
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  en,
  output word_t kt,
  output step_t t
);

  round_e sel;

  mod80_counter u_cnt (.clk, .rst_n, .clear, .en, .t);
  round_select  u_sel (.t, .sel);

  always_comb begin
    unique case (sel)
      ROUND_CH:  kt = K1;
      ROUND_P1:  kt = K2;
      ROUND_MAJ: kt = K3;
      ROUND_P2:  kt = K4;
    endcase
  end

endmodule
