// tb_rsa_pe: self-checking test of one processing element (K = 5).
//
// Streams back-to-back passes of W = 8 words (128-bit operands) through the
// element. For each pass and lane, the reference computes one Montgomery step
// S' = (S + a*2B + t*N)/2 with t = S mod 2 and a = bit K of the lane's
// multiplier word, on wide integers. Every output word is compared, and the
// output tag must appear exactly 2 cycles after the input (two-stage pipeline).
module tb_rsa_pe;
  import rsa_pkg::*;

  localparam int K = 5, W = 8, PASSES = 40;
  typedef logic [16*W-1:0] val_t;

  logic clk = 1'b0, rst = 1'b1;
  pe_link_t li, lo;
  rsa_pe #(.K(K)) dut (.clk, .rst, .li, .lo);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  val_t exp_q [$];
  val_t S [PASSES][2], B [PASSES], N [PASSES];
  word_t AW [PASSES][2];
  longint cyc = 0, in_first_cyc [$];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic val_t rnd(int bits);
    val_t x = '0;
    for (int i = 0; i < W; i++) x[16*i +: 16] = 16'($urandom);
    return x & ((val_t'(1) << bits) - 1);
  endfunction

  initial begin
    li = '0;
    for (int p = 0; p < PASSES; p++) begin
      N[p] = rnd(100) | val_t'(1);
      B[p] = rnd(100) % (2 * N[p]);
      for (int l = 0; l < 2; l++) begin
        S[p][l]  = rnd(101) % (2 * B[p] + N[p]);
        AW[p][l] = 16'($urandom);
        if (p < 4) AW[p][l][K] = p[l];   // all four (a, lane) combinations early
      end
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int p = 0; p < PASSES; p++) begin
      for (int j = 0; j < W; j++) begin
        val_t b2;
        b2 = B[p] << 1;
        li.tag.valid <= 1'b1;
        li.tag.first <= (j == 0);
        li.tag.last  <= (p == PASSES - 1);
        li.b2        <= b2[16*j +: 16];
        li.n         <= N[p][16*j +: 16];
        li.acc[0]    <= S[p][0][16*j +: 16];
        li.acc[1]    <= S[p][1][16*j +: 16];
        li.aw        <= (j == 0) ? {AW[p][1], AW[p][0]} : 32'($urandom);
        if (j == 0) in_first_cyc.push_back(cyc + 1);
        @(posedge clk);
      end
      // a gap of one empty word after some passes
      if (p % 3 == 2) begin
        li <= '0;
        @(posedge clk);
      end
    end
    li <= '0;
    repeat (6) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  int op = 0, oj = 0;
  val_t got [2];
  always @(posedge clk) begin
    if (!rst && lo.tag.valid) begin
      if (lo.tag.first) begin
        oj = 0;
        checks++;
        if (in_first_cyc.size() == 0 || cyc != in_first_cyc.pop_front() + 2) begin
          failures++;
          $display("FAIL: latency of pass %0d", op);
        end
      end
      got[0][16*oj +: 16] = lo.acc[0];
      got[1][16*oj +: 16] = lo.acc[1];
      oj++;
      if (oj == W) begin
        for (int l = 0; l < 2; l++) begin
          val_t e;
          logic a, t;
          a = AW[op][l][K];
          t = S[op][l][0];
          e = (S[op][l] + (a ? (B[op] << 1) : '0) + (t ? N[op] : '0)) >> 1;
          checks++;
          if (got[l] != e) begin
            failures++;
            $display("FAIL: pass %0d lane %0d got %h exp %h", op, l, got[l], e);
          end
        end
        op++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
