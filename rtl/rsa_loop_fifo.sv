// rsa_loop_fifo: programmable delay line that closes the PE-array loop.
//
// The accumulator words leaving the PE array must re-enter it exactly one pass
// later. A pass lasts L+4 cycles (L = block size in 16-bit words) while the
// array itself takes 32 cycles, so the remaining L+4-32 cycles are made up
// here. The buffer is a ring of DEPTH words: every cycle the word stored len
// cycles ago is read and the incoming word is written in its place, so
// dout(t) = din(t - len) for 1 <= len <= DEPTH. No handshake: the loop runs
// at one word per clock. Two instances, one per accumulator lane, form the
// two FIFOs of the design. DEPTH = 228 serves the 4096-bit block
// (256 + 4 - 32); the source sizes the FIFO 224 words for its 256-cycle pass.
module rsa_loop_fifo
  import rsa_pkg::*;
#(
  parameter int unsigned WIDTH = WORD,
  parameter int unsigned DEPTH = 228
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH+1)-1:0] len,   // delay in cycles, 1..DEPTH
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (32'(ptr) + 1 >= 32'(len)) ptr <= '0;
    else ptr <= ptr + 1'b1;
  end

endmodule
