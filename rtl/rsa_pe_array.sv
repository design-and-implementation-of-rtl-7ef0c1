// rsa_pe_array: the chain of processing elements.
//
// NPE elements (16, one per bit of a data word) are connected in series; one
// pass of a word stream through the chain applies 16 Montgomery iterations,
// using bits 0..15 of the multiplier word that travels with word 0. Every
// element has a two-stage pipeline, so a word leaves the array 2*NPE = 32
// cycles after it entered. The array accepts one word per clock without
// stalls; the tag of every word (valid, first, last) travels with it.
// The element count and the latency follow the source design.
module rsa_pe_array
  import rsa_pkg::*;
#(
  parameter int unsigned NPE = WORD
) (
  input  logic     clk,
  input  logic     rst,
  input  pe_link_t li,
  output pe_link_t lo
);

  pe_link_t link [NPE+1];

  assign link[0] = li;

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    rsa_pe #(.K(k)) u_pe (
      .clk (clk),
      .rst (rst),
      .li  (link[k]),
      .lo  (link[k+1])
    );
  end

  assign lo = link[NPE];

endmodule
