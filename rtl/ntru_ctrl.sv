// ntru_ctrl: controller and address generator of the NTRUEncrypt core.
//
// Computes one output coefficient per "row": out_k = sum_i c_i * d_(k-i mod N)
// (+ addend_k), where c is a packed ternary polynomial and d a mod-q polynomial
// with one coefficient per word. Every cycle makes exactly one RAM access:
//   S_CREAD        read coefficient word at coef_ptr, coef_ptr++
//   S_SLOT0..3     slot s of the current word: jump to the first non-zero
//                  coefficient t >= s and read d at data index idx-(t-s);
//                  idx moves down by t-s+1. If the rest of the word is zero,
//                  act as S_CREAD (or as S_MREAD after the last word) in the
//                  same cycle, moving idx down by 4-s.
//   S_MREAD        read the addend (plaintext) word at rd_ptr
//   S_WRITE        write the result at wr_ptr, rewind coef_ptr, idx += 4*NW-N+1
//                  (the next row starts one data coefficient higher), next row.
// So a row costs NW + (non-zero coefficients) + 2 cycles, as in the document's
// cycle formula N*(ceil(2N/W) + 2L + 2). The data index idx counts 0..N-1 and
// wraps modulo N; the RAM address is its base pointer plus idx.
//
// Encryption runs one pass (r, h, m -> e). Decryption runs two passes through
// the same logic with other base pointers: (f, e -> b) then (f_p, b -> c). The
// pointers are parameters (the document's "pointers given as constants"); the
// defaults lay out the polynomials back to back from address 0.
//
// The datapath is told, one cycle after each data read, to accumulate the RAM
// output with the sign of its coefficient (acc_en/acc_neg), and to form and
// write the result in S_WRITE (wr_en). start is taken only in S_IDLE; busy is high
// from the next cycle until the last result is written, and done pulses for
// one cycle right after that write.
//
// Following the document: states, one-hot codes, pointer moves, one access per
// cycle and zero skipping. This design's own choices: the modulo-N data index,
// end-of-row detection by comparing coef_ptr with its last address, and a
// dummy addend read in the decryption passes so all passes share the timing.
module ntru_ctrl
  import ntru_pkg::*;
#(
  parameter int unsigned N      = 167,
  parameter int unsigned NW     = coef_words(N),
  parameter int unsigned R_PTR  = 0,               // blinding value r (packed)
  parameter int unsigned H_PTR  = R_PTR + NW,      // public key h
  parameter int unsigned M_PTR  = H_PTR + N,       // plaintext m
  parameter int unsigned E_PTR  = M_PTR + N,       // ciphertext e
  parameter int unsigned F_PTR  = E_PTR + N,       // private key f (packed)
  parameter int unsigned FP_PTR = F_PTR + NW,      // private key f_p (packed)
  parameter int unsigned B_PTR  = FP_PTR + NW,     // temporary b = (f*e) mod 3
  parameter int unsigned C_PTR  = B_PTR + N        // decrypted message c
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   decrypt,     // 0: encryption, 1: decryption (sampled with start)
  output logic   busy,
  output logic   done,
  // RAM port
  output addr_t  ram_addr,
  output logic   ram_ren,
  output logic   ram_wen,
  input  word_t  ram_rdata,
  // datapath control
  output phase_t phase,
  output logic   acc_en,
  output logic   acc_neg,
  output logic   wr_en
);

  localparam int unsigned IW      = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned ROW_INC = SLOTS * NW - N + 1;

  typedef logic [IW-1:0] idx_t;

  // (i - d) mod N and (i + d) mod N for 0 <= d <= SLOTS < N
  function automatic idx_t idx_sub(input idx_t i, input int unsigned d);
    int signed t;
    t = int'(i) - int'(d);
    if (t < 0) t = t + int'(N);
    return idx_t'(t);
  endfunction

  function automatic idx_t idx_add(input idx_t i, input int unsigned d);
    int unsigned t;
    t = int'(i) + d;
    if (t >= N) t = t - N;
    return idx_t'(t);
  endfunction

  // base pointers of each pass
  typedef struct packed {
    addr_t coef;
    addr_t data;
    addr_t rd;
    addr_t wr;
  } bases_t;

  function automatic bases_t bases_of(input phase_t p);
    case (p)
      PH_DEC1: return '{coef: addr_t'(F_PTR),  data: addr_t'(E_PTR), rd: addr_t'(E_PTR), wr: addr_t'(B_PTR)};
      PH_DEC2: return '{coef: addr_t'(FP_PTR), data: addr_t'(B_PTR), rd: addr_t'(B_PTR), wr: addr_t'(C_PTR)};
      default: return '{coef: addr_t'(R_PTR),  data: addr_t'(H_PTR), rd: addr_t'(M_PTR), wr: addr_t'(E_PTR)};
    endcase
  endfunction

  state_t  state, state_n;
  phase_t  phase_n;
  addr_t   coef_ptr, coef_ptr_n;
  idx_t    idx, idx_n;
  addr_t   rd_ptr, rd_ptr_n;
  addr_t   wr_ptr, wr_ptr_n;
  logic [IW:0] msg_cnt, msg_cnt_n;
  word_t   coef_reg, coef_reg_n;
  logic    pend_n, neg_n, done_n;

  bases_t  base;
  word_t   cw;
  logic [1:0] cur_slot;
  logic    last_word;
  logic    sk_found, sk_neg;
  logic [1:0] sk_slot, sk_gap;

  assign base      = bases_of(phase);
  assign cw        = (state == S_SLOT0) ? ram_rdata : coef_reg;
  assign last_word = (coef_ptr == base.coef + addr_t'(NW));

  always_comb begin
    case (state)
      S_SLOT1: cur_slot = 2'd1;
      S_SLOT2: cur_slot = 2'd2;
      S_SLOT3: cur_slot = 2'd3;
      default: cur_slot = 2'd0;
    endcase
  end

  ntru_skip u_skip (
    .word  (cw),
    .start (cur_slot),
    .found (sk_found),
    .slot  (sk_slot),
    .gap   (sk_gap),
    .neg   (sk_neg)
  );

  function automatic state_t slot_state(input logic [1:0] s);
    case (s)
      2'd0:    return S_SLOT0;
      2'd1:    return S_SLOT1;
      2'd2:    return S_SLOT2;
      default: return S_SLOT3;
    endcase
  endfunction

  always_comb begin
    bases_t nb;
    state_n    = state;
    phase_n    = phase;
    coef_ptr_n = coef_ptr;
    idx_n      = idx;
    rd_ptr_n   = rd_ptr;
    wr_ptr_n   = wr_ptr;
    msg_cnt_n  = msg_cnt;
    coef_reg_n = coef_reg;
    pend_n     = 1'b0;
    neg_n      = 1'b0;
    done_n     = 1'b0;
    ram_addr   = '0;
    ram_ren    = 1'b0;
    ram_wen    = 1'b0;
    wr_en      = 1'b0;
    nb         = bases_of(decrypt ? PH_DEC1 : PH_ENC);

    case (state)
      S_IDLE: begin
        if (start) begin
          phase_n    = decrypt ? PH_DEC1 : PH_ENC;
          coef_ptr_n = nb.coef;
          idx_n      = '0;
          rd_ptr_n   = nb.rd;
          wr_ptr_n   = nb.wr;
          msg_cnt_n  = 1;
          state_n    = S_CREAD;
        end
      end

      S_CREAD: begin
        ram_addr   = coef_ptr;
        ram_ren    = 1'b1;
        coef_ptr_n = coef_ptr + 1'b1;
        state_n    = S_SLOT0;
      end

      S_SLOT0, S_SLOT1, S_SLOT2, S_SLOT3: begin
        if (state == S_SLOT0) coef_reg_n = ram_rdata;
        if (sk_found) begin
          // read the data coefficient that pairs with slot sk_slot
          ram_addr = base.data + addr_t'(idx_sub(idx, int'(sk_gap)));
          ram_ren  = 1'b1;
          idx_n    = idx_sub(idx, int'(sk_gap) + 1);
          pend_n   = 1'b1;
          neg_n    = sk_neg;
          if (sk_slot != 2'd3) state_n = slot_state(sk_slot + 2'd1);
          else if (last_word)  state_n = S_MREAD;
          else                 state_n = S_CREAD;
        end else if (last_word) begin
          // rest of the word is zero, row done: act as S_MREAD
          ram_addr = rd_ptr;
          ram_ren  = 1'b1;
          idx_n    = idx_sub(idx, SLOTS - int'(cur_slot));
          state_n  = S_WRITE;
        end else begin
          // rest of the word is zero: act as S_CREAD
          ram_addr   = coef_ptr;
          ram_ren    = 1'b1;
          coef_ptr_n = coef_ptr + 1'b1;
          idx_n      = idx_sub(idx, SLOTS - int'(cur_slot));
          state_n    = S_SLOT0;
        end
      end

      S_MREAD: begin
        ram_addr = rd_ptr;
        ram_ren  = 1'b1;
        state_n  = S_WRITE;
      end

      S_WRITE: begin
        ram_addr   = wr_ptr;
        ram_wen    = 1'b1;
        wr_en      = 1'b1;
        coef_ptr_n = base.coef;
        idx_n      = idx_add(idx, ROW_INC);
        rd_ptr_n   = rd_ptr + 1'b1;
        wr_ptr_n   = wr_ptr + 1'b1;
        msg_cnt_n  = msg_cnt + 1'b1;
        state_n    = S_CREAD;
        if (msg_cnt == (IW+1)'(N)) begin
          if (phase == PH_DEC1) begin
            // second decryption pass: same loop, f_p and b
            nb         = bases_of(PH_DEC2);
            phase_n    = PH_DEC2;
            coef_ptr_n = nb.coef;
            idx_n      = '0;
            rd_ptr_n   = nb.rd;
            wr_ptr_n   = nb.wr;
            msg_cnt_n  = 1;
          end else begin
            state_n = S_IDLE;
            done_n  = 1'b1;
          end
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      phase    <= PH_ENC;
      coef_ptr <= '0;
      idx      <= '0;
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      msg_cnt  <= '0;
      coef_reg <= '0;
      acc_en   <= 1'b0;
      acc_neg  <= 1'b0;
      done     <= 1'b0;
    end else begin
      state    <= state_n;
      phase    <= phase_n;
      coef_ptr <= coef_ptr_n;
      idx      <= idx_n;
      rd_ptr   <= rd_ptr_n;
      wr_ptr   <= wr_ptr_n;
      msg_cnt  <= msg_cnt_n;
      coef_reg <= coef_reg_n;
      acc_en   <= pend_n;
      acc_neg  <= neg_n;
      done     <= done_n;
    end
  end

  assign busy = (state != S_IDLE);

  // a data read is only ever issued from a slot state
  assert property (@(posedge clk) disable iff (!rst_n) pend_n |-> state inside {S_SLOT0, S_SLOT1, S_SLOT2, S_SLOT3});
  // never read and write the RAM in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(ram_ren && ram_wen));

endmodule
