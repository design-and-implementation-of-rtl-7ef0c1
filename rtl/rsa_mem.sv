// rsa_mem: one of the five 256 x 16-bit memory blocks.
//
// A simple dual-port memory with one write port and one synchronous read
// port: the word at raddr appears on rdata in the cycle after re is high and
// stays there until the next read. The design uses five instances, holding the
// key (E or D), the modulus N, the coefficient R^2 mod N and the running
// values S and P of the exponentiation. Size and count follow the source
// design; the port arrangement (one read, one write, registered read as in an
// FPGA block RAM) is this design's choice. Contents are not reset.
module rsa_mem
  import rsa_pkg::*;
#(
  parameter int unsigned WIDTH = WORD,
  parameter int unsigned DEPTH = MAX_WORDS
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
