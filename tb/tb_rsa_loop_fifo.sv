// tb_rsa_loop_fifo: self-checking test of the programmable loop delay.
//
// For each delay used by the four block sizes (L+4-32 = 4, 36, 100, 228) and
// for delay 1, random words are pushed every cycle and, once the line has
// filled, dout must equal the word pushed exactly len cycles earlier.
module tb_rsa_loop_fifo;
  import rsa_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] len;
  word_t din, dout;
  rsa_loop_fifo dut (.clk, .rst, .len, .din, .dout);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lens [5] = '{4, 36, 100, 228, 1};

  initial begin
    word_t hist [$];
    din = '0;
    len = 8'd4;
    repeat (3) @(posedge clk);
    for (int c = 0; c < 5; c++) begin
      rst <= 1'b1;
      len <= 8'(lens[c]);
      @(posedge clk);
      rst <= 1'b0;
      hist.delete();
      for (int t = 0; t < 3 * lens[c] + 50; t++) begin
        word_t w;
        w = 16'($urandom);
        din <= w;
        @(posedge clk);
        hist.push_back(w);
        #1;
        // now in the cycle after hist[$] was presented: dout must be the
        // word presented len cycles before this one
        if (hist.size() >= lens[c]) begin
          checks++;
          if (dout != hist[hist.size() - lens[c]]) begin
            failures++;
            $display("FAIL: len %0d t %0d got %h exp %h", lens[c], t, dout,
                     hist[hist.size() - lens[c]]);
          end
        end
      end
    end
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
