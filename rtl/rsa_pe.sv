// rsa_pe: one processing element of the Montgomery PE array.
//
// Each element performs one iteration of the modified Montgomery step
//     t = S mod 2;  S = (S + a*2B + t*N) / 2
// on operands that arrive as a stream of 16-bit words, least significant word
// first, one word per clock. Because the multiplicand enters doubled (2B is
// even), the reduction bit t depends only on the low bit of S and is known as
// soon as word 0 arrives. The multiplier bit a is bit K of the multiplier word
// that travels with word 0 of each pass.
//
// Two accumulator lanes share the multiplicand and modulus words: lane 0
// computes S*P and lane 1 computes P*P of the right-to-left exponentiation, so
// both products of one exponent bit are formed in the same pass.
//
// Pipeline (two stages, two cycles per element, as in the source design):
//   stage 1 adds S + a*2B + t*N + carry for the current word (18-bit sum, 2-bit
//           carry kept for the next word);
//   stage 2 holds the previous word's sum; the output word is the right shift
//           by one of the sum stream, {next sum bit 0, this sum[15:1]}.
// The bit shifted in is zero when the next word starts a new pass or is empty.
// The per-element register contents and the lane sharing are this design's
// own choices; the source gives the iteration, the 16-bit width and the
// two-stage pipeline.
module rsa_pe
  import rsa_pkg::*;
#(
  parameter int unsigned K = 0   // which bit of the multiplier word this PE uses
) (
  input  logic     clk,
  input  logic     rst,
  input  pe_link_t li,
  output pe_link_t lo
);

  // Stage 1 registers.
  pe_link_t    s1;
  word_t [1:0] s1_sum;
  logic  [1:0] a_q, t_q;
  logic  [1:0][1:0] c_q;
  // Stage 2 registers.
  pe_link_t    s2;
  word_t [1:0] s2_sum;

  logic [1:0]       a_c, t_c;
  logic [1:0][1:0]  cin_c;
  logic [1:0][17:0] sum_c;

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      a_c[l]   = li.tag.first ? li.aw[l][K]  : a_q[l];
      t_c[l]   = li.tag.first ? li.acc[l][0] : t_q[l];
      cin_c[l] = li.tag.first ? 2'b00        : c_q[l];
      sum_c[l] = {2'b00, li.acc[l]}
               + (a_c[l] ? {2'b00, li.b2} : 18'd0)
               + (t_c[l] ? {2'b00, li.n}  : 18'd0)
               + {16'd0, cin_c[l]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1     <= '0;
      s1_sum <= '0;
      a_q    <= '0;
      t_q    <= '0;
      c_q    <= '0;
      s2     <= '0;
      s2_sum <= '0;
    end else begin
      s1 <= li;
      if (li.tag.valid) begin
        for (int l = 0; l < 2; l++) begin
          s1_sum[l] <= sum_c[l][15:0];
          c_q[l]    <= sum_c[l][17:16];
          a_q[l]    <= a_c[l];
          t_q[l]    <= t_c[l];
        end
      end else begin
        s1_sum <= '0;
      end
      s2     <= s1;
      s2_sum <= s1_sum;
    end
  end

  logic shift_in_ok;
  assign shift_in_ok = s1.tag.valid && !s1.tag.first;

  always_comb begin
    lo = s2;
    for (int l = 0; l < 2; l++)
      lo.acc[l] = {shift_in_ok & s1_sum[l][0], s2_sum[l][15:1]};
  end

endmodule
