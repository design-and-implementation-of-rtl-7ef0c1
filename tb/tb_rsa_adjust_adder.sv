// tb_rsa_adjust_adder: self-checking test of the word-serial S - N subtractor.
//
// For random 9-word operands (S < 2N, and directed cases S = N, S = N - 1,
// S = N + 1) the words of S and N are streamed, least significant first; the
// collected difference words must equal (S - N) mod 2^144 and the final
// borrow must be 1 exactly when S < N.
module tb_rsa_adjust_adder;
  import rsa_pkg::*;

  localparam int W = 9;
  typedef logic [16*W-1:0] val_t;

  logic clk = 1'b0, rst = 1'b1, valid = 1'b0, first = 1'b0;
  word_t a = '0, b = '0, diff;
  logic borrow_out;
  rsa_adjust_adder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_lt = 0, n_ge = 0;

  function automatic val_t rnd(int bits);
    val_t x = '0;
    for (int i = 0; i < W; i++) x[16*i +: 16] = 16'($urandom);
    return x & ((val_t'(1) << bits) - 1);
  endfunction

  task automatic run(input val_t s, input val_t n);
    val_t d, e;
    logic bo;
    // inputs change at the falling edge, outputs are sampled 1 time unit later,
    // the register captures at the rising edge
    for (int j = 0; j < W; j++) begin
      @(negedge clk);
      valid = 1'b1; first = (j == 0);
      a = s[16*j +: 16]; b = n[16*j +: 16];
      #1;
      d[16*j +: 16] = diff;
      bo = borrow_out;
    end
    @(negedge clk);
    valid = 1'b0;
    e = s - n;
    checks += 2;
    if (d != e) begin failures++; $display("FAIL: diff %h exp %h", d, e); end
    if (bo != (s < n)) begin failures++; $display("FAIL: borrow %0b", bo); end
    if (s < n) n_lt++; else n_ge++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      val_t n, s;
      n = rnd(128) | val_t'(1);
      n[127] = 1'b1;
      s = rnd(129) % (2 * n);
      run(s, n);
    end
    begin
      val_t n;
      n = rnd(128) | val_t'(1);
      run(n, n);
      run(n - 1, n);
      run(n + 1, n);
    end
    checks++;
    if (n_lt == 0 || n_ge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
