// hash_control_unit: sequences the hashing of one block.
//
// States: IDLE, STEP, ADD. In IDLE a `start` with `len_ok` high raises `load`
// for that cycle (W generator, compression registers and initial hash are loaded,
// the step counters cleared) and moves to STEP. In STEP `step` is high for 80
// cycles, counted by a module-80 counter; after step 79 the unit spends one cycle
// in ADD with `add` high and returns to IDLE. So an accepted start is followed by
// 80 step cycles and then one add cycle; `busy` is high in STEP and ADD, and a
// start is ignored while busy or when `len_ok` is low.
// The design names the control unit and its task; the states and handshake are
// this implementation's.
module hash_control_unit
  import sha1_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic len_ok,
  output logic load,
  output logic step,
  output logic add,
  output logic busy
);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_ADD} state_e;

  state_e state, state_nxt;
  step_t  t;

  mod80_counter u_cnt (.clk, .rst_n, .clear(load), .en(step), .t);

  always_comb begin
    load      = 1'b0;
    step      = 1'b0;
    add       = 1'b0;
    state_nxt = state;
    unique case (state)
      S_IDLE: if (start && len_ok) begin
        load      = 1'b1;
        state_nxt = S_STEP;
      end
      S_STEP: begin
        step = 1'b1;
        if (t == step_t'(NUM_STEPS - 1)) state_nxt = S_ADD;
      end
      S_ADD: begin
        add       = 1'b1;
        state_nxt = S_IDLE;
      end
      default: state_nxt = S_IDLE;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nxt;
  end

endmodule
