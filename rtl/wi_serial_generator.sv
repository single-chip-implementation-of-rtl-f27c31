// wi_serial_generator: serial SHA-1 message schedule, one word Wt per step.
//
// On `load` the 512-bit block is split into W0..W15 (W0 = block[511:480]) and
// stored in a 16-word shift register. `wt` is always the word at the head of the
// register. Each `step` shifts the register by one word and appends
// W(t+16) = ROTL1(W(t+13) ^ W(t+8) ^ W(t+2) ^ W(t)), so after k steps `wt` = Wk.
// Over an operation the 80 words W0..W79 thus come out one per clock while only
// 16 words are stored. `load` has priority over `step`.
//
// The design calls for a serial W generator feeding the compression; the
// 16-word shift register is this implementation's form of it.
module wi_serial_generator
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         load,
  input  logic         step,
  input  logic [511:0] block,
  output word_t        wt
);

  word_t w [16];
  word_t w_new;

  assign w_new = rotl(w[13] ^ w[8] ^ w[2] ^ w[0], 1);
  assign wt    = w[0];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
    end else if (step) begin
      for (int i = 0; i < 15; i++) w[i] <= w[i+1];
      w[15] <= w_new;
    end
  end

endmodule
