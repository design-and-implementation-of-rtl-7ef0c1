// rsa_top: reconfigurable RSA modular exponentiator, 512/1024/2048/4096 bits.
//
// Computes M^E mod N for one of four block sizes selected at run time, through
// a 16-bit data bus (19 input and 19 output pins with clk/reset/enable and
// busy/out_enable/out_valid). Operands live in five 256 x 16-bit memories
// (key, N, R^2 mod N, S, P) instead of 4096-bit registers. The arithmetic is a
// chain of 16 two-stage processing elements that performs 16 Montgomery
// iterations per pass over a stream of 16-bit words; the accumulator words
// leaving the chain are delayed by two loop FIFOs (one per lane) so they
// re-enter the chain exactly one pass later. A block of L words takes L+1
// passes of L+4 cycles per Montgomery product, and each exponent bit costs one
// product time because S*P and P*P run in two lanes that share the
// multiplicand P. A word-serial adjustment subtractor produces S - N at the
// end, and a detector finds the effective key length k so only k exponent bits
// are processed.
//
// Host protocol: see rsa_ctrl. Montgomery radix R = 2^(16(L+1)-1) = 2^(n+15);
// the host supplies R^2 mod N = 2^(2n+30) mod N during configuration.
// Values S and P are kept below 2N, so they may need bit n: that bit of each
// is held in a flip-flop (s_ext, p_ext) next to the 256-word memories.
//
// Latency of one M^E mod N: (k+1) products of 1 + (L+1)(L+4) + 34 cycles,
// plus L+1 adjustment cycles; result read-out takes L cycles after the Result
// mode word. The structure (memories, PE array, FIFO, adjustment adder,
// complete detector) follows the source design; the exact sequencing,
// two-lane sharing and the radix are this design's choices.
module rsa_top
  import rsa_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  enable,
  input  word_t data_in,
  output logic  busy,
  output logic  out_enable,
  output logic  out_valid,
  output word_t data_out
);

  localparam int unsigned FIFO_DEPTH = MAX_WORDS + 4 - 2 * WORD;
  localparam int unsigned FLW        = $clog2(FIFO_DEPTH + 1);

  // ---------------- controller ----------------
  klen_t              klen;
  idx_t               L;
  logic               cfg_start, msg_start, ld_we;
  logic [1:0]         ld_sel;
  logic [ADDR_W-1:0]  ld_addr;
  word_t              ld_data;
  logic               pre, key_rd, areq;
  klen_t              bit_idx;
  idx_t               a_idx, iss_word, adj_word, res_word;
  logic               iss_valid, iss_first, iss_last, iss_pass0;
  logic               adj_valid, adj_first, adj_last, res_rd;

  rsa_ctrl #(.NPE(WORD)) u_ctrl (
    .clk, .rst(reset), .enable, .data_in, .klen,
    .busy, .out_enable, .out_valid, .words(L),
    .cfg_start, .msg_start, .ld_we, .ld_sel, .ld_addr, .ld_data,
    .pre, .key_rd, .bit_idx, .areq, .a_idx,
    .iss_valid, .iss_first, .iss_last, .iss_pass0, .iss_word,
    .adj_valid, .adj_first, .adj_last, .adj_word,
    .res_rd, .res_word
  );

  // ---------------- memories ----------------
  logic              n_we, r2_we, k_we, s_we, p_we;
  logic [ADDR_W-1:0] n_wa, r2_wa, k_wa, s_wa, p_wa;
  word_t             n_wd, r2_wd, k_wd, s_wd, p_wd;
  logic              n_re, r2_re, k_re, s_re, p_re;
  logic [ADDR_W-1:0] n_ra, r2_ra, k_ra, s_ra, p_ra;
  word_t             n_rd, r2_rd, k_rd, s_rd, p_rd;

  rsa_mem u_mem_n   (.clk, .we(n_we),  .waddr(n_wa),  .wdata(n_wd),  .re(n_re),  .raddr(n_ra),  .rdata(n_rd));
  rsa_mem u_mem_r2  (.clk, .we(r2_we), .waddr(r2_wa), .wdata(r2_wd), .re(r2_re), .raddr(r2_ra), .rdata(r2_rd));
  rsa_mem u_mem_key (.clk, .we(k_we),  .waddr(k_wa),  .wdata(k_wd),  .re(k_re),  .raddr(k_ra),  .rdata(k_rd));
  rsa_mem u_mem_s   (.clk, .we(s_we),  .waddr(s_wa),  .wdata(s_wd),  .re(s_re),  .raddr(s_ra),  .rdata(s_rd));
  rsa_mem u_mem_p   (.clk, .we(p_we),  .waddr(p_wa),  .wdata(p_wd),  .re(p_re),  .raddr(p_ra),  .rdata(p_rd));

  rsa_key_length u_klen (
    .clk, .rst(reset), .clear(cfg_start),
    .we(ld_we && ld_sel == 2'd2), .widx(ld_addr), .wdata(ld_data), .klen
  );

  // Read side: addresses issued by the controller.
  assign n_re  = iss_valid || adj_valid;
  assign n_ra  = ADDR_W'(iss_valid ? iss_word : adj_word);
  assign r2_re = iss_valid && pre;
  assign r2_ra = ADDR_W'(iss_word);
  assign k_re  = key_rd;
  assign k_ra  = ADDR_W'(bit_idx >> 4);
  assign p_re  = areq || (iss_valid && !pre) || res_rd;
  assign p_ra  = ADDR_W'(areq ? a_idx : (res_rd ? res_word : iss_word));
  assign s_re  = areq || adj_valid || res_rd;
  assign s_ra  = ADDR_W'(areq ? a_idx : (adj_valid ? adj_word : res_word));

  // Controller outputs delayed to line up with the registered read data.
  logic  v_q, first_q, last_q, pass0_q, areq_q, key_q, adj_v_q, adj_f_q, adj_l_q;
  idx_t  word_q, a_idx_q, adj_word_q;
  logic [3:0] bit_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      {v_q, first_q, last_q, pass0_q, areq_q, key_q, adj_v_q, adj_f_q, adj_l_q} <= '0;
      word_q <= '0; a_idx_q <= '0; adj_word_q <= '0; bit_q <= '0;
    end else begin
      v_q        <= iss_valid;
      first_q    <= iss_first;
      last_q     <= iss_last;
      pass0_q    <= iss_pass0;
      word_q     <= iss_word;
      areq_q     <= areq;
      a_idx_q    <= a_idx;
      key_q      <= key_rd;
      bit_q      <= bit_idx[3:0];
      adj_v_q    <= adj_valid;
      adj_f_q    <= adj_first;
      adj_l_q    <= adj_last;
      adj_word_q <= adj_word;
    end
  end

  // Word j of a value: memory word for j < L, the extra bit n for j == L,
  // zero above.
  function automatic word_t ext_word(idx_t j, idx_t len, word_t d, logic top);
    if (j < len)       return d;
    else if (j == len) return word_t'(top);
    else               return '0;
  endfunction

  // ---------------- operand stream into the PE array ----------------
  logic        s_ext, p_ext, ebit, bmsb_q;
  word_t [1:0] aw_q;
  word_t       b_word, n_word;
  word_t [1:0] fifo_out, fifo_in;
  pe_link_t    arr_in, arr_out;

  assign b_word = pre ? ext_word(word_q, L, r2_rd, 1'b0) : ext_word(word_q, L, p_rd, p_ext);
  assign n_word = ext_word(word_q, L, n_rd, 1'b0);

  always_comb begin
    arr_in.tag.valid = v_q;
    arr_in.tag.first = first_q;
    arr_in.tag.last  = last_q;
    arr_in.b2        = {b_word[WORD-2:0], bmsb_q & !first_q};
    arr_in.n         = n_word;
    arr_in.acc[0]    = pass0_q ? '0 : fifo_out[0];
    arr_in.acc[1]    = pass0_q ? '0 : fifo_out[1];
    arr_in.aw        = aw_q;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      bmsb_q <= 1'b0;
      aw_q   <= '0;
      ebit   <= 1'b0;
    end else begin
      if (v_q) bmsb_q <= b_word[WORD-1];
      if (areq_q) begin
        aw_q[0] <= ext_word(a_idx_q, L, s_rd, s_ext);
        aw_q[1] <= ext_word(a_idx_q, L, p_rd, p_ext);
      end
      if (key_q) ebit <= k_rd[bit_q];
    end
  end

  rsa_pe_array #(.NPE(WORD)) u_array (.clk, .rst(reset), .li(arr_in), .lo(arr_out));

  logic [FLW-1:0] fifo_len;
  assign fifo_len = FLW'(32'(L) + 4 - 2 * WORD);
  assign fifo_in  = arr_out.acc;

  for (genvar l = 0; l < 2; l++) begin : g_fifo
    rsa_loop_fifo #(.WIDTH(WORD), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst(reset), .len(fifo_len), .din(fifo_in[l]), .dout(fifo_out[l])
    );
  end

  // ---------------- write-back of the last pass ----------------
  idx_t wb_cnt, wb_j;
  logic wb_act, wb_we, wb_top, s_upd;

  assign wb_act = arr_out.tag.valid && arr_out.tag.last;
  assign wb_j   = arr_out.tag.first ? '0 : wb_cnt;
  assign wb_we  = wb_act && (wb_j < L);
  assign wb_top = wb_act && (wb_j == L);
  assign s_upd  = !pre && ebit;

  // ---------------- adjustment ----------------
  word_t adj_a, adj_diff;
  logic  adj_bo, out_sel;

  assign adj_a = ext_word(adj_word_q, L, s_rd, s_ext);

  rsa_adjust_adder u_adj (
    .clk, .rst(reset), .valid(adj_v_q), .first(adj_f_q),
    .a(adj_a), .b(ext_word(adj_word_q, L, n_rd, 1'b0)),
    .diff(adj_diff), .borrow_out(adj_bo)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      wb_cnt  <= '0;
      s_ext   <= 1'b0;
      p_ext   <= 1'b0;
      out_sel <= 1'b0;
    end else begin
      if (wb_act) wb_cnt <= wb_j + 1'b1;
      if (msg_start) begin
        s_ext <= 1'b0;
        p_ext <= 1'b0;
      end
      if (wb_top) begin
        p_ext <= arr_out.acc[1][0];
        if (s_upd) s_ext <= arr_out.acc[0][0];
      end
      if (adj_v_q && adj_l_q) out_sel <= !adj_bo;
    end
  end

  // Memory write ports.
  always_comb begin
    n_we  = ld_we && ld_sel == 2'd0;  n_wa  = ld_addr;  n_wd  = ld_data;
    r2_we = ld_we && ld_sel == 2'd1;  r2_wa = ld_addr;  r2_wd = ld_data;
    k_we  = ld_we && ld_sel == 2'd2;  k_wa  = ld_addr;  k_wd  = ld_data;

    s_we = 1'b0; s_wa = ld_addr; s_wd = '0;
    p_we = 1'b0; p_wa = ld_addr; p_wd = ld_data;
    if (ld_we && ld_sel == 2'd3) begin
      // message load: P = M, S = 1
      p_we = 1'b1;
      s_we = 1'b1;
      s_wd = word_t'(ld_addr == '0);
    end else if (wb_we) begin
      p_we = 1'b1;
      p_wa = ADDR_W'(wb_j);
      p_wd = arr_out.acc[1];
      s_we = s_upd;
      s_wa = ADDR_W'(wb_j);
      s_wd = arr_out.acc[0];
    end else if (adj_v_q && adj_word_q < L) begin
      p_we = 1'b1;
      p_wa = ADDR_W'(adj_word_q);
      p_wd = adj_diff;
    end
  end

  assign data_out = out_valid ? (out_sel ? p_rd : s_rd) : '0;

  // A product result stays below 2N: only bit 0 of word L may be set and the
  // words above L are zero.
  always_ff @(posedge clk)
    if (!reset && wb_act && wb_j >= L)
      assert (arr_out.acc[1][WORD-1:1] == '0 && (wb_j == L || arr_out.acc[1] == '0))
        else $error("product out of range at word %0d", wb_j);

endmodule
