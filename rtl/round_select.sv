// round_select: the multiplexer selection signal generator.
//
// Turns the 7-bit step number t into the 2-bit round index used by the 4:1
// multiplexers of the function and constant selection: 0 for steps 0..19, 1 for
// 20..39, 2 for 40..59, 3 for 60..79. Combinational, built from three
// comparisons; the 7-bit input and 2-bit output follow the design.
module round_select
  import sha1_pkg::*;
(
  input  step_t  t,
  output round_e sel
);

  always_comb begin
    if      (t < 7'd20) sel = ROUND_CH;
    else if (t < 7'd40) sel = ROUND_P1;
    else if (t < 7'd60) sel = ROUND_MAJ;
    else                sel = ROUND_P2;
  end

endmodule
