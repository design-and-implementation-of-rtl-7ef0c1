// tb_rsa_workloads: full-length-key exponentiations at 512, 1024 and 2048 bits.
//
// Throughput figures for this kind of design are quoted for a key whose
// length k equals the block size n. This testbench runs that case: a random
// exponent with its top bit set, a random odd modulus and message, checked
// against a wide-integer reference. It checks the cycle count against
// (k+1)*(1+(L+1)(L+4)+34)+(L+1) and prints the resulting throughput,
// n*f/cycles, at 116.7 MHz and 370 MHz. The 4096-bit full-length case
// (about 274 million cycles) is left out to keep the run short; the
// 4096-bit datapath is covered with a 17-bit exponent in tb_rsa_top.
module tb_rsa_workloads;
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
    $display("  throughput %0.1f kb/s at 116.7 MHz, %0.1f kb/s at 370 MHz",
             real'(n) * 116.7e6 / real'(t1 - t0) / 1.0e3, real'(n) * 370.0e6 / real'(t1 - t0) / 1.0e3);
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

  int sizes [3] = '{512, 1024, 2048};

  initial begin
    big_t e;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);
    foreach (sizes[i]) begin
      e = rand_big(sizes[i]);
      e[sizes[i] - 1] = 1'b1;
      run_case(sizes[i], e, sizes[i], $sformatf("%0d full-length key", sizes[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
