// sha1_ref_pkg: a plain, unclocked SHA-1 reference for the testbenches.
//
// Written straight from the SHA-1 definition and independent of the RTL: the
// padding is built bit by bit, the schedule as a full 80-word array, and the
// step with its own constant table. Functions return results as plain vectors
// with A in the most significant word.
package sha1_ref_pkg;

  function automatic logic [31:0] rl(input logic [31:0] x, input int n);
    logic [63:0] d;
    d = {x, x} << n;
    return d[63:32];
  endfunction

  function automatic logic [31:0] ref_k(input int t);
    case (t / 20)
      0:       return 32'h5A827999;
      1:       return 32'h6ED9EBA1;
      2:       return 32'h8F1BBCDC;
      default: return 32'hCA62C1D6;
    endcase
  endfunction

  function automatic logic [31:0] ref_f(input int t, input logic [31:0] b,
                                        input logic [31:0] c, input logic [31:0] d);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (t / 20)
        0:       r[i] = b[i] ? c[i] : d[i];
        2:       r[i] = (int'(b[i]) + int'(c[i]) + int'(d[i])) >= 2;
        default: r[i] = b[i] ^ c[i] ^ d[i];
      endcase
    end
    return r;
  endfunction

  // Padded block of a message whose first bit is msg[447].
  function automatic logic [511:0] ref_pad(input logic [447:0] msg, input int len);
    logic [511:0] blk;
    blk = '0;
    for (int i = 0; i < len; i++) blk[511 - i] = msg[447 - i];
    blk[511 - len] = 1'b1;
    for (int i = 0; i < 64; i++) blk[i] = ((len >> i) & 1) != 0;
    return blk;
  endfunction

  function automatic logic [31:0] ref_w(input logic [511:0] blk, input int t);
    logic [31:0] w [80];
    for (int i = 0; i < 16; i++) w[i] = blk[511 - 32*i -: 32];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    return w[t];
  endfunction

  function automatic logic [159:0] ref_step(input logic [159:0] s, input int t,
                                            input logic [31:0] w, input logic [31:0] k,
                                            input logic [31:0] f);
    logic [31:0] a, b, c, d, e, tmp;
    {a, b, c, d, e} = s;
    tmp = rl(a, 5) + f + e + k + w;
    return {tmp, a, rl(b, 30), c, d};
  endfunction

  // Internal hash value after 80 steps (no final addition).
  function automatic logic [159:0] ref_rounds(input logic [159:0] iv, input logic [511:0] blk);
    logic [159:0] s;
    s = iv;
    for (int t = 0; t < 80; t++)
      s = ref_step(s, t, ref_w(blk, t), ref_k(t), ref_f(t, s[127:96], s[95:64], s[63:32]));
    return s;
  endfunction

  function automatic logic [159:0] ref_add(input logic [159:0] x, input logic [159:0] y);
    logic [159:0] r;
    for (int i = 0; i < 5; i++) r[32*i +: 32] = x[32*i +: 32] + y[32*i +: 32];
    return r;
  endfunction

  function automatic logic [159:0] ref_hash(input logic [159:0] iv, input logic [447:0] msg,
                                            input int len);
    return ref_add(iv, ref_rounds(iv, ref_pad(msg, len)));
  endfunction

  function automatic logic [159:0] std_iv();
    return 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;
  endfunction

  function automatic logic [447:0] rand_msg();
    logic [447:0] m;
    for (int i = 0; i < 14; i++) m[32*i +: 32] = $urandom;
    return m;
  endfunction

endpackage
