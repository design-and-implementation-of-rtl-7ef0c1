// tb_rsa_key_length: self-checking test of the key-length (complete) detector.
//
// Loads keys of random lengths (including 17, 2^1022+1 style, all-zero, a
// full 4096-bit key and a key whose high words are zero) word by word and
// compares the reported length with the position of the highest set bit + 1.
module tb_rsa_key_length;
  import rsa_pkg::*;

  localparam int NW = 256;
  typedef logic [16*NW-1:0] key_t;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, we = 1'b0;
  logic [7:0] widx = '0;
  word_t wdata = '0;
  klen_t klen;
  rsa_key_length dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic load(input key_t k, input int words);
    int e;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int j = 0; j < words; j++) begin
      we <= 1'b1; widx <= 8'(j); wdata <= k[16*j +: 16];
      @(posedge clk);
    end
    we <= 1'b0;
    @(posedge clk);
    e = 0;
    for (int i = 0; i < 16 * words; i++) if (k[i]) e = i + 1;
    checks++;
    if (int'(klen) != e) begin
      failures++;
      $display("FAIL: klen %0d exp %0d", klen, e);
    end
  endtask

  initial begin
    key_t k;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    load(key_t'(17), 32);
    k = '0; k[1022] = 1'b1; k[0] = 1'b1;
    load(k, 64);
    load('0, 32);
    k = '1;
    load(k, 256);
    for (int t = 0; t < 40; t++) begin
      int bits;
      bits = $urandom_range(1, 4096);
      k = '0;
      for (int j = 0; j < NW; j++) k[16*j +: 16] = 16'($urandom);
      k = k & ((key_t'(1) << bits) - 1);
      k[bits - 1] = 1'b1;
      load(k, (bits <= 512) ? 32 : (bits <= 1024) ? 64 : (bits <= 2048) ? 128 : 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
