// rsa_key_length: the "complete detector" that finds the effective key length.
//
// While the key (E or D) is loaded word by word, this unit records the
// position of its most significant set bit: for a word w != 0 at word index j
// the candidate length is 16*j + msb(w) + 1, and the largest candidate is kept.
// The result k is the number of exponent bits the exponentiation must scan
// (for E = 17 it is 5). 'clear' restarts it at zero before a new key. The
// source gives the function; the streaming form is this design's choice.
module rsa_key_length
  import rsa_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              we,
  input  logic [ADDR_W-1:0] widx,
  input  word_t             wdata,
  output klen_t             klen
);

  logic [4:0] msb_plus1;
  klen_t      cand;

  always_comb begin
    msb_plus1 = '0;
    for (int i = 0; i < WORD; i++)
      if (wdata[i]) msb_plus1 = 5'(i + 1);
    cand = klen_t'({widx, 4'b0000}) + klen_t'(msb_plus1);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) klen <= '0;
    else if (we && wdata != '0 && cand > klen) klen <= cand;
  end

endmodule
