// tb_rsa_ctrl: self-checking test of the operation-mode controller.
//
// Drives the host protocol and an externally supplied key length, and counts
// the controller's commands. Checks, per block size used (512 and 4096 bits):
// configuration writes 3L words in the order N, R^2, key with the right
// addresses and ignores extra words; busy falls after enable falls; an
// en/decryption burst writes L message words and keeps busy high; each of the
// k+1 products issues (L+1) passes of L+4 words, L+1 multiplier-word reads
// and one key read with bit index 0,0,1,..,k-1; the adjustment streams L+1
// words; out_enable rises after the predicted number of cycles; a mode word
// other than Result is ignored while out_enable is high; Result streams L
// words with out_valid one cycle after each read; then all flags fall.
module tb_rsa_ctrl;
  import rsa_pkg::*;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0;
  word_t data_in = '0;
  klen_t klen = '0;
  logic busy, out_enable, out_valid, cfg_start, msg_start, ld_we, pre, key_rd, areq;
  logic iss_valid, iss_first, iss_last, iss_pass0, adj_valid, adj_first, adj_last, res_rd;
  idx_t words, a_idx, iss_word, adj_word, res_word;
  logic [1:0] ld_sel;
  logic [7:0] ld_addr;
  word_t ld_data;
  klen_t bit_idx;

  rsa_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // command counters, cleared by the test
  int c_ld [4], c_key, c_iss, c_first, c_last, c_areq, c_adj, c_adjf, c_adjl, c_res, c_ov;
  int c_pass0, bad_order, bad_ov;
  klen_t bits_seen [$];
  logic res_rd_q = 1'b0;

  task automatic clear_counts();
    c_ld = '{0, 0, 0, 0};
    {c_key, c_iss, c_first, c_last, c_areq, c_adj, c_adjf, c_adjl, c_res, c_ov} = '0;
    {c_pass0, bad_order, bad_ov} = '0;
    bits_seen.delete();
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    res_rd_q <= res_rd;
    if (!rst) begin
      if (ld_we) begin
        // expected target and address of the c-th load word
        int idx;
        idx = c_ld[0] + c_ld[1] + c_ld[2] + c_ld[3];
        if (ld_sel != 2'd3 && (ld_sel != 2'(idx / words) || ld_addr != 8'(idx % words)))
          bad_order++;
        if (ld_sel == 2'd3 && ld_addr != 8'(c_ld[3])) bad_order++;
        c_ld[ld_sel]++;
      end
      if (key_rd) begin c_key++; bits_seen.push_back(pre ? klen_t'('1) : bit_idx); end
      if (iss_valid) c_iss++;
      if (iss_first) c_first++;
      if (iss_last) c_last++;
      if (iss_pass0) c_pass0++;
      if (areq) c_areq++;
      if (adj_valid) c_adj++;
      if (adj_first) c_adjf++;
      if (adj_last) c_adjl++;
      if (res_rd) c_res++;
      if (out_valid) c_ov++;
      if (out_valid != res_rd_q) bad_ov++;
    end
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic put(input logic en, input word_t d);
    @(negedge clk);
    enable  = en;
    data_in = d;
  endtask

  task automatic run_size(input logic [3:0] code, input int L, input int k);
    int t0, t1, model;
    int P, m32;
    clear_counts();
    // configuration: mode word, 3L words, two extra words
    put(1'b1, {10'd0, 2'b01, code});
    for (int i = 0; i < 3 * L + 2; i++) put(1'b1, 16'(i));
    put(1'b0, '0);
    @(negedge clk);
    chk(busy == 1'b0, "busy low after configuration");
    chk(c_ld[0] == L && c_ld[1] == L && c_ld[2] == L && c_ld[3] == 0, "3L config words");
    chk(bad_order == 0, "config order and addresses");
    chk(words == idx_t'(L), "block size decoded");
    klen = klen_t'(k);
    // en/decryption
    clear_counts();
    put(1'b1, {10'd0, 2'b00, code});
    for (int i = 0; i < L; i++) put(1'b1, 16'(i));
    put(1'b0, '0);
    t0 = cyc;
    @(negedge clk);
    chk(busy == 1'b1 && out_enable == 1'b0, "busy stays high during en/decryption");
    chk(c_ld[3] == L && bad_order == 0, "L message words");
    while (!out_enable) @(negedge clk);
    t1 = cyc;
    P = (k + 1);
    m32 = P * (1 + (L + 1) * (L + 4) + 34) + (L + 1);
    model = m32;
    $display("size %0d words k=%0d: %0d cycles to out_enable, model %0d", L, k, t1 - t0, model);
    chk((t1 - t0) >= model && (t1 - t0) <= model + 3, "cycles to out_enable");
    chk(c_key == P, "one key read per product");
    chk(c_iss == P * (L + 1) * (L + 4), "words issued");
    chk(c_first == P * (L + 1), "passes issued");
    chk(c_last == P * (L + 4), "last-pass words");
    chk(c_pass0 == P * (L + 4), "pass-0 words");
    chk(c_areq == P * (L + 1), "multiplier-word reads");
    chk(c_adj == L + 1 && c_adjf == 1 && c_adjl == 1, "adjustment stream");
    begin
      bit ok;
      ok = (bits_seen.size() == P) && (bits_seen[0] == klen_t'('1));
      for (int i = 1; i < bits_seen.size(); i++) if (bits_seen[i] != klen_t'(i - 1)) ok = 0;
      chk(ok, "exponent bit order");
    end
    // a configuration word while the result waits is ignored
    put(1'b1, {10'd0, 2'b01, code});
    put(1'b0, '0);
    repeat (3) @(negedge clk);
    chk(out_enable && busy && c_ld[0] == 0, "mode word ignored while result pending");
    // result
    put(1'b1, {10'd0, 2'b10, code});
    put(1'b0, '0);
    repeat (L + 4) @(negedge clk);
    chk(c_res == L && c_ov == L && bad_ov == 0, "result words and out_valid timing");
    chk(!busy && !out_enable && !out_valid, "flags low after result");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_size(4'b0001, 32, 3);
    run_size(4'b1000, 256, 0);
    run_size(4'b0010, 64, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
