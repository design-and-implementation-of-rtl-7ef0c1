// tb_rsa_roundtrip: RSA encryption followed by decryption with a real key pair.
//
// For 512- and 1024-bit blocks the testbench generates two random primes p, q
// of n/2 bits (trial division, then Miller-Rabin with bases 2, 3, 5, 7, 11),
// forms N = p*q, E = 65537 and D = E^-1 mod (p-1)(q-1) by the extended
// Euclidean algorithm. It configures the engine with (N, R^2 mod N, E),
// encrypts a random message M, checks C = M^E mod N against a reference,
// then reconfigures with the private key D (a full-length exponent), decrypts
// C and checks that M comes back. The key length the engine reports for D is
// checked too. R^2 mod N is 2^(2n+30) mod N.
module tb_rsa_roundtrip;
  import rsa_pkg::*;

  localparam int NB = 1024;
  typedef logic [NB+31:0]   big_t;
  typedef logic [2*NB+63:0] dbl_t;

  logic  clk = 1'b0, reset = 1'b1, enable = 1'b0;
  word_t data_in = '0, data_out;
  logic  busy, out_enable, out_valid;

  rsa_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic big_t mulmod(big_t a, big_t b, big_t m);
    dbl_t p;
    p = dbl_t'(a) * dbl_t'(b);
    return big_t'(p % dbl_t'(m));
  endfunction

  function automatic big_t powmod(big_t b, big_t e, big_t m);
    big_t r = 1;
    for (int i = NB + 31; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, b, m);
    end
    return r;
  endfunction

  function automatic big_t rand_big(int bits);
    big_t x = '0;
    for (int i = 0; i < bits; i += 32) x[i +: 32] = $urandom;
    for (int i = bits; i < NB + 32; i++) x[i] = 1'b0;
    return x;
  endfunction

  function automatic bit is_probable_prime(big_t n);
    int sp [12] = '{3, 5, 7, 11, 13, 17, 19, 23, 29, 31, 37, 41};
    int bases [5] = '{2, 3, 5, 7, 11};
    big_t d, x, nm1;
    int s;
    foreach (sp[i]) if (n % big_t'(sp[i]) == 0) return 1'b0;
    nm1 = n - 1;
    d = nm1;
    s = 0;
    while (!d[0]) begin d = d >> 1; s++; end
    foreach (bases[i]) begin
      bit comp;
      x = powmod(big_t'(bases[i]), d, n);
      if (x == 1 || x == nm1) continue;
      comp = 1'b1;
      for (int r = 1; r < s; r++) begin
        x = mulmod(x, x, n);
        if (x == nm1) begin comp = 1'b0; break; end
      end
      if (comp) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic big_t gen_prime(int bits);
    big_t p;
    do begin
      p = rand_big(bits);
      p[bits - 1] = 1'b1;
      p[bits - 2] = 1'b1;
      p[0] = 1'b1;
    end while (!is_probable_prime(p));
    return p;
  endfunction

  // a^-1 mod m (gcd(a, m) = 1); coefficients kept reduced mod m
  function automatic big_t modinv(big_t a, big_t m);
    big_t old_r = a, r = m, old_s = 1, s = 0, q, t;
    while (r != 0) begin
      q = old_r / r;
      t = r; r = old_r - q * r; old_r = t;
      t = s; s = (old_s + m - mulmod(q, s, m)) % m; old_s = t;
    end
    return old_s;
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

  task automatic configure(input int n, input logic [3:0] code, input big_t N, input big_t key);
    big_t R2;
    R2 = big_t'((dbl_t'(1) << (2 * n + 30)) % dbl_t'(N));
    send_word({10'd0, 2'b01, code});
    send_big(N, n / 16);
    send_big(R2, n / 16);
    send_big(key, n / 16);
    end_burst();
    repeat (3) @(posedge clk);
  endtask

  task automatic crypt(input int n, input logic [3:0] code, input big_t M, output big_t R);
    send_word({10'd0, 2'b00, code});
    send_big(M, n / 16);
    end_burst();
    while (!out_enable) @(posedge clk);
    repeat (2) @(posedge clk);
    send_word({10'd0, 2'b10, code});
    end_burst();
    R = '0;
    for (int j = 0; j < n / 16; j++) begin
      while (!out_valid) @(posedge clk);
      R[16*j +: 16] = data_out;
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
  endtask

  task automatic roundtrip(input int n, input logic [3:0] code);
    big_t p, q, N, phi, E, D, M, C, M2;
    int kd;
    E = 65537;
    do begin
      p = gen_prime(n / 2);
      q = gen_prime(n / 2);
      phi = (p - 1) * (q - 1);
    end while (p == q || phi % E == 0);
    N = p * q;
    D = modinv(E, phi);
    check(mulmod(D, E, phi) == 1, "key pair consistent (reference)");
    M = rand_big(n - 1);
    configure(n, code, N, E);
    crypt(n, code, M, C);
    check(C == powmod(M, E, N), $sformatf("%0d: ciphertext", n));
    configure(n, code, N, D);
    kd = 0;
    for (int i = 0; i < n; i++) if (D[i]) kd = i + 1;
    check(int'(dut.klen) == kd, $sformatf("%0d: key length of D", n));
    crypt(n, code, C, M2);
    check(M2 == M, $sformatf("%0d: decryption returns the message", n));
    $display("%0d-bit round trip: k(D) = %0d, %s", n, kd, (M2 == M) ? "ok" : "MISMATCH");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);
    roundtrip(512, 4'b0001);
    roundtrip(1024, 4'b0010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
