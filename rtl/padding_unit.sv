// padding_unit: builds the single padded 512-bit SHA-1 block from a short message.
//
// The message arrives left-aligned on `msg`: its first bit is msg[MSG_BITS-1], and
// only the top `msg_len` bits are used. The block is the message, one 1 bit, zero
// bits, and the message length as a 64-bit big-endian number in block[63:0]. This
// is the padding rule of SHA-1. The core handles one block per message, so a
// message must leave room for the 1 bit and the length: at most 447 bits.
// `len_ok` is low for a longer length, and the control unit then refuses to start.
//
// Purely combinational; the W generator captures `block` when an operation starts.
// The one-block limit follows the design; the left-aligned message port and the
// len_ok flag are this implementation's choices.
module padding_unit #(
  parameter int unsigned MSG_BITS = 448
) (
  input  logic [MSG_BITS-1:0]       msg,
  input  logic [$clog2(MSG_BITS+1)-1:0] msg_len,
  output logic [511:0]              block,
  output logic                      len_ok
);

  localparam int unsigned LW = $clog2(MSG_BITS+1);

  logic [511:0] msg_ext;   // message in the top of the block
  logic [511:0] keep;      // 1 for the message bits
  logic [511:0] one_bit;   // the appended 1

  always_comb begin
    msg_ext = '0;
    msg_ext[511 -: MSG_BITS] = msg;
    keep    = ~({512{1'b1}} >> msg_len);
    one_bit = {1'b1, 511'b0} >> msg_len;
    block   = (msg_ext & keep) | one_bit;
    block[63:0] = 64'(msg_len);
    len_ok  = msg_len < LW'(MSG_BITS);
  end

endmodule
