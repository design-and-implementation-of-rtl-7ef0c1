// rsa_adjust_adder: word-serial final subtraction D = S - N.
//
// The exponentiation leaves S in the range 0 <= S < 2N; the final result is S
// or S - N. This unit subtracts one 16-bit word pair per clock, least
// significant first, keeping the borrow in a register between words. The word
// difference and the borrow out of the current word are combinational; 'first'
// marks word 0 (borrow in forced to zero). After the last word, borrow_out = 0
// means S >= N and the difference is the reduced result. The source names the
// unit and its role; the word-serial form is this design's choice.
module rsa_adjust_adder
  import rsa_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  valid,
  input  logic  first,
  input  word_t a,        // word of S
  input  word_t b,        // word of N
  output word_t diff,
  output logic  borrow_out
);

  logic borrow_q;
  logic bin;
  logic [WORD:0] d;

  assign bin        = first ? 1'b0 : borrow_q;
  assign d          = {1'b0, a} - {1'b0, b} - {{WORD{1'b0}}, bin};
  assign diff       = d[WORD-1:0];
  assign borrow_out = d[WORD];

  always_ff @(posedge clk) begin
    if (rst)        borrow_q <= 1'b0;
    else if (valid) borrow_q <= borrow_out;
  end

endmodule
