// tb_rsa_mem: self-checking test of a 256 x 16 memory block.
//
// Fills all 256 words with random data, reads them back in random order
// (data must appear one cycle after the read), checks that rdata holds while
// re is low (even when the address changes), and that a simultaneous write to another address does not
// disturb a read.
module tb_rsa_mem;
  import rsa_pkg::*;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  word_t wdata = '0, rdata;
  rsa_mem dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t model [256];

  task automatic chk(input word_t e, input string s);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL: %s got %h exp %h", s, rdata, e);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      model[a] = 16'($urandom);
      we <= 1'b1; waddr <= 8'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int i = 0; i < 600; i++) begin
      int a, b;
      a = $urandom_range(0, 255);
      b = $urandom_range(0, 255);
      re <= 1'b1; raddr <= 8'(a);
      if (b != a) begin
        we <= 1'b1; waddr <= 8'(b); wdata <= 16'($urandom);
      end else we <= 1'b0;
      @(posedge clk);
      #1;
      chk(model[a], "read");
      if (b != a) model[b] = wdata;
      re <= 1'b0; we <= 1'b0;
      raddr <= 8'(a + 1);   // address moves while re is low: rdata must hold
      @(posedge clk);
      #1;
      chk(model[a], "hold");
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
