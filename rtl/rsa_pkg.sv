// rsa_pkg: types and constants shared by the reconfigurable RSA exponentiator.
//
// The datapath is 16 bits wide (the width of the external data bus) and the
// processing-element array has one element per bit of a data word, so one pass
// through the array performs 16 Montgomery iterations. The four block sizes,
// 512/1024/2048/4096 bits, are 32/64/128/256 words; the mode word sent on the
// data bus selects the operation in bits [5:4] and the size, one-hot, in bits
// [3:0]. The struct pe_link_t is the bundle that travels from one processing
// element to the next; it recurs 17 times in the array.
package rsa_pkg;

  localparam int unsigned WORD      = 16;   // data word, bus width, PEs per array
  localparam int unsigned MAX_WORDS = 256;  // 4096-bit block
  localparam int unsigned ADDR_W    = 8;    // memory address width
  localparam int unsigned IDX_W     = 10;   // word/pass counters (reach L+3)
  localparam int unsigned KLEN_W    = 13;   // key length, 0..4096

  typedef logic [WORD-1:0]   word_t;
  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [KLEN_W-1:0] klen_t;

  // Operation field of the mode word, in[5:4].
  typedef enum logic [1:0] {
    OP_CRYPT  = 2'b00,  // encryption / decryption
    OP_CONFIG = 2'b01,  // load N, R^2 mod N and the key
    OP_RESULT = 2'b10,  // read the result out
    OP_NONE   = 2'b11
  } op_e;

  // Stream tag that travels with every data word through the PE array.
  typedef struct packed {
    logic valid;  // word carries data
    logic first;  // word 0 of a pass
    logic last;   // word belongs to the last pass of a product
  } tag_t;

  // Bundle passed from one processing element to the next.
  typedef struct packed {
    tag_t        tag;
    word_t       b2;    // word of 2*B (multiplicand shifted left once)
    word_t       n;     // word of the modulus
    word_t [1:0] acc;   // accumulator words, lane 0 = S*P, lane 1 = P*P
    word_t [1:0] aw;    // multiplier words of this pass (bit k used by PE k)
  } pe_link_t;

  // Block length in words from the one-hot size field in[3:0].
  function automatic idx_t size_words(input logic [3:0] sz);
    idx_t w;
    if (sz[3])      w = idx_t'(256);
    else if (sz[2]) w = idx_t'(128);
    else if (sz[1]) w = idx_t'(64);
    else if (sz[0]) w = idx_t'(32);
    else            w = idx_t'(32);  // no size bit set: smallest block
    return w;
  endfunction

endpackage
