// sha1_pkg: types, constants and small functions shared by the serial SHA-1 blocks.
//
// The 160-bit chaining value is kept as a packed struct of five 32-bit words A..E,
// A in the most significant word, so that a plain 160-bit vector
// {A,B,C,D,E} and the struct are the same bits. The four round constants and the
// three logic functions are those of SHA-1: the constants as listed in the design's
// function/constant table, the functions choice, parity and majority. The standard
// initial hash value is provided for users and testbenches; the core itself takes
// its initial hash as an input.
package sha1_pkg;

  typedef logic [31:0] word_t;

  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } hash_t;

  // Step number 0..79, as produced by the module-80 counters (7 bits).
  typedef logic [6:0] step_t;

  // Round index selecting the function and constant: one per 20 steps.
  typedef enum logic [1:0] {
    ROUND_CH  = 2'd0,   // steps  0..19
    ROUND_P1  = 2'd1,   // steps 20..39
    ROUND_MAJ = 2'd2,   // steps 40..59
    ROUND_P2  = 2'd3    // steps 60..79
  } round_e;

  localparam int unsigned NUM_STEPS  = 80;
  localparam int unsigned MSG_BITS   = 448;

  localparam word_t K1 = 32'h5A827999;
  localparam word_t K2 = 32'h6ED9EBA1;
  localparam word_t K3 = 32'h8F1BBCDC;
  localparam word_t K4 = 32'hCA62C1D6;

  localparam hash_t SHA1_IV = '{
    a: 32'h67452301,
    b: 32'hEFCDAB89,
    c: 32'h98BADCFE,
    d: 32'h10325476,
    e: 32'hC3D2E1F0
  };

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t f_ch(input word_t b, input word_t c, input word_t d);
    return (b & c) | (~b & d);
  endfunction

  function automatic word_t f_parity(input word_t b, input word_t c, input word_t d);
    return b ^ c ^ d;
  endfunction

  function automatic word_t f_maj(input word_t b, input word_t c, input word_t d);
    return (b & c) | (b & d) | (c & d);
  endfunction

endpackage
