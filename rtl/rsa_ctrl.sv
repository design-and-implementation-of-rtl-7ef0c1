// rsa_ctrl: operation-mode decoder and exponentiation sequencer.
//
// Host protocol (follows the source design): when 'enable' rises, the data
// bus carries a mode word, op = in[5:4] and one-hot size = in[3:0]
// (0001/0010/0100/1000 = 512/1024/2048/4096 bits, i.e. L = 32..256 words).
//  * Configuration (01): the words that follow while 'enable' stays high are
//    stored, least significant word first, as N (L words), R^2 mod N (L words)
//    and the key (L words). 'busy' falls when 'enable' falls.
//  * Encryption/decryption (00): the following L words are the message M.
//    'busy' stays high; when the result is ready 'out_enable' rises.
//  * Result (10), accepted only while 'out_enable' is high: L result words are
//    driven out, one per clock, with 'out_valid'; afterwards 'busy',
//    'out_enable' and 'out_valid' fall together.
// The order of the three configuration operands and zero-filling of a short
// message are this design's choices.
//
// Exponentiation (right-to-left binary method of the source):
//   P = MM(M, R^2); S = 1; for i in 0..k-1 { if e_i: S = MM(S,P); P = MM(P,P) }
//   result = S or S - N
// where MM is the Montgomery product with R = 2^(16(L+1)-1) and k the key
// length from the complete detector. Each product is sequenced as
//   PRO   1 cycle: read key word (exponent bit) and the pass-0 multiplier words
//   RUN   L+1 passes of T = L+4 cycles; cycle w of a pass issues word w of the
//         multiplicand/modulus stream; in cycle T-2 the multiplier words of the
//         next pass are read (that slot never carries operand data)
//   DRAIN 2*NPE+2 cycles while the last pass leaves the array and is written
//         back to S and P
// so one product takes 1 + (L+1)(L+4) + 2*NPE + 2 cycles. Both products of an
// exponent bit share one product time (two accumulator lanes). After the last
// bit, ADJ streams S and N (L+1 words) through the adjustment adder.
// All outputs are combinational from the state, except out_valid (registered
// so it lines up with the memory's registered read data).
module rsa_ctrl
  import rsa_pkg::*;
#(
  parameter int unsigned NPE = WORD
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  word_t             data_in,
  input  klen_t             klen,
  output logic              busy,
  output logic              out_enable,
  output logic              out_valid,
  output idx_t              words,       // L of the current block size
  // loading
  output logic              cfg_start,   // pulse: configuration begins
  output logic              msg_start,   // pulse: message load begins
  output logic              ld_we,
  output logic [1:0]        ld_sel,      // 0 N, 1 R^2, 2 key, 3 message
  output logic [ADDR_W-1:0] ld_addr,
  output word_t             ld_data,
  // product sequencing
  output logic              pre,         // current product is P = MM(M, R^2)
  output logic              key_rd,
  output klen_t             bit_idx,
  output logic              areq,
  output idx_t              a_idx,
  output logic              iss_valid,
  output logic              iss_first,
  output logic              iss_last,
  output logic              iss_pass0,   // word belongs to pass 0 (accumulator starts at 0)
  output idx_t              iss_word,
  // adjustment
  output logic              adj_valid,
  output logic              adj_first,
  output logic              adj_last,
  output idx_t              adj_word,
  // result read-out
  output logic              res_rd,
  output idx_t              res_word
);

  localparam int unsigned DRAIN = 2 * NPE + 2;

  typedef enum logic [3:0] {
    ST_IDLE, ST_CFG, ST_MSG, ST_PRO, ST_RUN, ST_DRAIN,
    ST_ADJ, ST_ADJW, ST_DONE, ST_RES, ST_RESW
  } state_e;

  state_e state;
  logic   en_q;
  idx_t   cnt, w, p;
  idx_t   T;
  logic   en_rise;
  op_e    op;

  assign en_rise = enable && !en_q;
  assign op      = op_e'(data_in[5:4]);
  assign T       = words + idx_t'(4);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_IDLE;
      en_q      <= 1'b0;
      cnt       <= '0;
      w         <= '0;
      p         <= '0;
      words     <= idx_t'(32);
      pre       <= 1'b0;
      bit_idx   <= '0;
      out_valid <= 1'b0;
    end else begin
      en_q      <= enable;
      out_valid <= res_rd;
      unique case (state)
        ST_IDLE: if (en_rise) begin
          cnt <= '0;
          if (op == OP_CONFIG) begin
            words <= size_words(data_in[3:0]);
            state <= ST_CFG;
          end else if (op == OP_CRYPT) begin
            words <= size_words(data_in[3:0]);
            state <= ST_MSG;
          end
        end
        ST_CFG: begin
          if (!enable) state <= ST_IDLE;
          else if (cnt < 3 * words) cnt <= cnt + 1'b1;
        end
        ST_MSG: begin
          if (cnt < words) cnt <= cnt + 1'b1;
          else if (!enable) begin
            pre     <= 1'b1;
            bit_idx <= '0;
            state   <= ST_PRO;
          end
        end
        ST_PRO: begin
          w     <= '0;
          p     <= '0;
          state <= ST_RUN;
        end
        ST_RUN: begin
          if (w == T - 1) begin
            w <= '0;
            if (p == words) begin
              cnt   <= '0;
              state <= ST_DRAIN;
            end else begin
              p <= p + 1'b1;
            end
          end else begin
            w <= w + 1'b1;
          end
        end
        ST_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == DRAIN - 1) begin
            cnt <= '0;
            if (pre) begin
              pre     <= 1'b0;
              bit_idx <= '0;
              state   <= (klen == '0) ? ST_ADJ : ST_PRO;
            end else begin
              bit_idx <= bit_idx + 1'b1;
              state   <= (bit_idx + 1'b1 >= klen) ? ST_ADJ : ST_PRO;
            end
          end
        end
        ST_ADJ: begin
          if (cnt == words) state <= ST_ADJW;
          else cnt <= cnt + 1'b1;
        end
        ST_ADJW: state <= ST_DONE;
        ST_DONE: if (en_rise && op == OP_RESULT) begin
          cnt   <= '0;
          state <= ST_RES;
        end
        ST_RES: begin
          if (cnt == words - 1) state <= ST_RESW;
          else cnt <= cnt + 1'b1;
        end
        ST_RESW: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    busy       = (state != ST_IDLE);
    out_enable = (state == ST_DONE) || (state == ST_RES) || (state == ST_RESW);

    cfg_start = (state == ST_IDLE) && en_rise && (op == OP_CONFIG);
    msg_start = (state == ST_IDLE) && en_rise && (op == OP_CRYPT);

    ld_we   = 1'b0;
    ld_sel  = 2'd0;
    ld_addr = '0;
    ld_data = data_in;
    if (state == ST_CFG && enable && cnt < 3 * words) begin
      ld_we = 1'b1;
      if (cnt < words) begin
        ld_sel  = 2'd0;
        ld_addr = ADDR_W'(cnt);
      end else if (cnt < 2 * words) begin
        ld_sel  = 2'd1;
        ld_addr = ADDR_W'(cnt - words);
      end else begin
        ld_sel  = 2'd2;
        ld_addr = ADDR_W'(cnt - 2 * words);
      end
    end else if (state == ST_MSG && cnt < words) begin
      ld_we   = 1'b1;
      ld_sel  = 2'd3;
      ld_addr = ADDR_W'(cnt);
      ld_data = enable ? data_in : '0;
    end

    key_rd    = (state == ST_PRO);
    areq      = 1'b0;
    a_idx     = '0;
    iss_valid = (state == ST_RUN);
    iss_first = (state == ST_RUN) && (w == '0);
    iss_last  = (state == ST_RUN) && (p == words);
    iss_pass0 = (state == ST_RUN) && (p == '0);
    iss_word  = w;
    if (state == ST_PRO) begin
      areq  = 1'b1;
      a_idx = '0;
    end else if (state == ST_RUN && w == T - 2 && p != words) begin
      areq  = 1'b1;
      a_idx = p + 1'b1;
    end

    adj_valid = (state == ST_ADJ);
    adj_first = (state == ST_ADJ) && (cnt == '0);
    adj_last  = (state == ST_ADJ) && (cnt == words);
    adj_word  = cnt;

    res_rd   = (state == ST_RES);
    res_word = cnt;
  end

  // The result can only be read while it is available.
  always_ff @(posedge clk)
    if (!rst) assert (!out_valid || out_enable)
      else $error("out_valid outside the result phase");

endmodule
