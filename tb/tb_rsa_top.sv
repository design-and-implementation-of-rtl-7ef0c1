// tb_rsa_top: end-to-end test of the RSA exponentiator at its default size.
//
// For each case the testbench draws a random odd modulus N of the block size
// (top bit set), a message M < N and an exponent E, computes R^2 mod N with
// R = 2^(n+15) and the expected M^E mod N with plain wide-integer arithmetic,
// then drives the host protocol: Configuration burst (mode word, N, R^2 mod N,
// key), Encryption burst (mode word, M), wait for out_enable, Result mode word,
// collect L words while out_valid is high, compare. It also checks the cycle
// count of the exponentiation against (k+1)*(1+(L+1)(L+4)+34)+(L+1) plus a
// small protocol constant, the busy/out_enable behaviour of each mode, and
// counts how often each mechanism occurred: every block size, configuration,
// en/decryption and result modes, exponent bits 0 and 1, a final subtraction
// taken (directed case M = N) and not taken, and a zero-length key.
module tb_rsa_top;
  import rsa_pkg::*;

  localparam int NB = 4096;
  typedef logic [NB+31:0]   big_t;

  logic  clk = 1'b0, reset = 1'b1, enable = 1'b0;
  word_t data_in = '0, data_out;
  logic  busy, out_enable, out_valid;

  rsa_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_cfg = 0, n_crypt = 0, n_res = 0, n_sub = 0, n_nosub = 0;
  int n_bit1 = 0, n_bit0 = 0, n_k0 = 0;
  int n_size [4] = '{0, 0, 0, 0};

  always @(posedge clk) begin
    if (dut.key_q && !dut.pre) begin
      if (dut.k_rd[dut.bit_q]) n_bit1++; else n_bit0++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // a*b mod n by interleaved shift-and-add (a, b < n)
  function automatic big_t modmul(big_t a, big_t b, big_t n, int bits);
    big_t r = '0;
    for (int i = bits - 1; i >= 0; i--) begin
      r = r << 1;
      if (r >= n) r = r - n;
      if (a[i]) begin
        r = r + b;
        if (r >= n) r = r - n;
      end
    end
    return r;
  endfunction

  function automatic big_t modexp(big_t m, big_t e, big_t n, int bits, int nbits);
    big_t r = 1;
    for (int i = bits - 1; i >= 0; i--) begin
      r = modmul(r, r, n, nbits);
      if (e[i]) r = modmul(r, m, n, nbits);
    end
    return r;
  endfunction

  function automatic big_t pow2mod(int e, big_t n);
    big_t x = 1;
    for (int i = 0; i < e; i++) begin
      x = x << 1;
      if (x >= n) x = x - n;
    end
    return x;
  endfunction

  function automatic big_t rand_big(int bits);
    big_t x = '0;
    for (int i = 0; i < bits; i += 32) x[i +: 32] = $urandom;
    for (int i = bits; i < NB + 32; i++) x[i] = 1'b0;
    return x;
  endfunction

  task automatic send_word(input word_t w);
    @(posedge clk);
    enable  <= 1'b1;
    data_in <= w;
  endtask

  task automatic end_burst();
    @(posedge clk);
    enable  <= 1'b0;
    data_in <= '0;
  endtask

  task automatic send_big(input big_t v, input int L);
    for (int j = 0; j < L; j++) send_word(v[16*j +: 16]);
  endtask

  function automatic logic [3:0] size_code(int n);
    case (n)
      512:  return 4'b0001;
      1024: return 4'b0010;
      2048: return 4'b0100;
      default: return 4'b1000;
    endcase
  endfunction

  task automatic run_case(input int n, input big_t e, input int ebits, input string name,
                          input bit m_is_n = 1'b0);
    big_t N, M, R2, expv, got;
    int L, k, sz, m32;
    int t0, t1, expect_cyc;
    L  = n / 16;
    sz = (n == 512) ? 0 : (n == 1024) ? 1 : (n == 2048) ? 2 : 3;
    N  = rand_big(n);
    N[n-1] = 1'b1;
    N[0]   = 1'b1;
    M  = rand_big(n - 1);  // below 2^(n-1) <= N
    // M = N makes every Montgomery product equal N exactly, the one practical
    // way to reach S >= N and exercise the final subtraction (result 0).
    if (m_is_n) M = N;
    R2 = pow2mod(2 * n + 30, N);
    k  = 0;
    for (int i = 0; i < ebits; i++) if (e[i]) k = i + 1;
    expv = (k == 0) ? big_t'(1) : m_is_n ? big_t'(0) : modexp(M, e, N, k, n);

    // Configuration
    send_word({10'd0, 2'b01, size_code(n)});
    send_big(N, L);
    send_big(R2, L);
    send_big(e, L);
    end_burst();
    n_cfg++;
    repeat (3) @(posedge clk);
    check(!busy, {name, ": busy low after configuration"});
    check(dut.klen == klen_t'(k), {name, ": key length"});

    // Encryption
    send_word({10'd0, 2'b00, size_code(n)});
    send_big(M, L);
    end_burst();
    n_crypt++;
    t0 = cyc;
    @(posedge clk);
    check(busy && !out_enable, {name, ": busy during en/decryption"});
    while (!out_enable) @(posedge clk);
    t1 = cyc;
    m32 = (k + 1) * (1 + (L + 1) * (L + 4) + 34) + (L + 1);  // below 2^31 for n <= 4096
    expect_cyc = m32;
    $display("%s: n=%0d k=%0d cycles=%0d model=%0d (source estimate k*L*(L+4)=%0d)",
             name, n, k, t1 - t0, expect_cyc, k * L * (L + 4));
    check((t1 - t0) >= expect_cyc && (t1 - t0) <= expect_cyc + 4, {name, ": cycle count"});
    if (dut.out_sel) n_sub++; else n_nosub++;
    if (k == 0) n_k0++;
    n_size[sz]++;

    // Result
    repeat (2) @(posedge clk);
    check(out_enable && busy && !out_valid, {name, ": waiting for result mode"});
    send_word({10'd0, 2'b10, size_code(n)});
    end_burst();
    n_res++;
    got = '0;
    for (int j = 0; j < L; j++) begin
      while (!out_valid) @(posedge clk);
      got[16*j +: 16] = data_out;
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
    check(!busy && !out_enable && !out_valid, {name, ": idle after result"});
    check(got == expv, {name, ": result value"});
    if (got != expv) $display("  got %h\n  exp %h", got[511:0], expv[511:0]);
  endtask

  initial begin
    big_t e;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);

    run_case(512, big_t'(65537), 32, "512 e=65537");
    run_case(512, big_t'(0), 32, "512 e=0");
    run_case(512, big_t'(3), 32, "512 e=3");
    e = rand_big(64);
    run_case(512, e, 64, "512 e=random64");
    e = rand_big(512);
    run_case(512, e, 512, "512 e=random512");
    run_case(1024, big_t'(65537), 32, "1024 e=65537");
    run_case(2048, big_t'(65537), 32, "2048 e=65537");
    run_case(4096, big_t'(65537), 32, "4096 e=65537");
    run_case(1024, big_t'(17), 32, "1024 e=17 M=N", 1'b1);
    e = rand_big(32);
    run_case(2048, e, 32, "2048 e=random32");

    $display("mechanisms: cfg=%0d crypt=%0d result=%0d sizes=%0d/%0d/%0d/%0d bit1=%0d bit0=%0d sub=%0d nosub=%0d k0=%0d",
             n_cfg, n_crypt, n_res, n_size[0], n_size[1], n_size[2], n_size[3],
             n_bit1, n_bit0, n_sub, n_nosub, n_k0);
    check(n_cfg > 0 && n_crypt > 0 && n_res > 0, "all operation modes used");
    for (int s = 0; s < 4; s++) check(n_size[s] > 0, "every block size used");
    check(n_bit1 > 0 && n_bit0 > 0, "exponent bits 0 and 1 both seen");
    check(n_sub > 0, "final subtraction taken");
    check(n_nosub > 0, "final subtraction skipped");
    check(n_k0 > 0, "zero-length key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
