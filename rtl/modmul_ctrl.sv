// modmul_ctrl: the modular multiply program, P := A * B mod C.
//
// Works through the multiplier A from its top, six bits (one digit) at a
// time, keeping the running product P in RAM8 (below C after every digit):
//   P := 0;  S := index of the top 24-bit part of A
//   loop: ER := A[S]; S := S - 1
//         4 times: P := 64*P + ER[23:18] * B          (MULACC, nfields cycles)
//                  shift ER left by 6
//                  m := largest 7-bit m with m*C <= P  (binary search)
//                  P := P - m*C                       (REDUCE, nfields cycles)
//         until S has counted past zero (bit 7 of S set)
// The binary search tries the bits of m from the highest one, one cycle per
// bit, with the top-field estimate of the sequencer (SQ_TOPCMP); only when
// that is inconclusive (the numbers are "almost equal", probability about
// 2^-89 for random operands) a full compare of nfields cycles is run.
// Because 64*P + digit*B < 127*C, m always fits in 7 bits and the result of
// each step is again below C.
//
// Requirements: B < C, C > 0, C and B fit in nfields fields, A has no bits
// above part len_chunks-1 (parts are 24 bits, counted from bit 0).
// A, B, C are RAM128 registers reg_a, reg_b, reg_c; the result is in RAM8.
// S is index register 0 of INDEX_CALC.
//
// Timing: from the start cycle to the done pulse take
//   nfields + 1 + len_chunks * (4 * (2*nfields + 7) + 1)
// cycles, plus nfields per inconclusive estimate; with 8 fields and a
// 768-bit A that is 2944 cycles of digit work plus 41 cycles of loads and
// clearing, 2985 in all. The algorithm and the 8 + 8 + 7 cycles per digit
// follow the document; the state machine, the order of S and ER updates
// and the use of bit 7 of S as loop flag are this design's own.
// Unused input bits: len_chunks[5] (32 parts wrap to index 31 in the
// 5-bit part count, as intended), index registers 1..3 and the digit bits of
// S (ER itself steps through the digits by shifting).
module modmul_ctrl
  import rsaidea_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [3:0]      reg_a,
  input  logic [3:0]      reg_b,
  input  logic [3:0]      reg_c,
  input  logic [5:0]      len_chunks,   // 1..32 parts of 24 bits in A
  input  logic [3:0]      nfields,      // 1..8
  output logic            busy,
  output logic            done,
  output logic            full_cmp,     // pulses when a full compare starts
  // ALU sequencer
  output logic            seq_start,
  output seq_op_e         seq_op,
  output logic [3:0]      seq_rsel,
  output logic [7:0]      seq_e,
  output logic [3:0]      seq_nfields,
  input  logic            seq_done,
  input  top_res_e        top_res,
  input  logic            cmp_neg,
  // INDEX_CALC
  output ix_op_e          ix_op,
  output logic [1:0]      ix_dst,
  output ix_src_e         ix_src_sel,
  output logic [1:0]      ix_src_reg,
  output logic [7:0]      ix_imm,
  input  logic [3:0][7:0] idx,
  // ER
  output logic            er_load,
  output logic [1:0]      er_l_sel,
  output logic            er_shift6,
  input  logic [5:0]      er_top6,
  // RAM128 read port while loading ER
  output logic            er_rd,
  output logic [6:0]      er_raddr,
  input  logic [95:0]     r128_rdata,
  output logic [7:0]      state_code
);
  typedef enum logic [2:0] {
    M_IDLE, M_CLR, M_LOADER, M_MUL, M_SEARCH, M_FULL, M_RED, M_FIN
  } mstate_e;

  mstate_e     st, st_n;
  logic [3:0]  ra, rb, rc, nf;
  logic [1:0]  d, d_n;
  logic [6:0]  m, m_n;
  logic [2:0]  bitpos, bitpos_n;
  logic [6:0]  trial, m_dec;
  logic        decided;
  logic [7:0]  s_idx;

  assign s_idx = idx[0];
  assign trial = m | (7'd1 << bitpos);

  always_comb begin
    st_n       = st;
    d_n        = d;
    m_n        = m;
    bitpos_n   = bitpos;
    seq_start  = 1'b0;
    seq_op     = SQ_CLR8;
    seq_rsel   = rc;
    seq_e      = 8'd0;
    seq_nfields = nf;
    ix_op      = IX_NOP;
    ix_dst     = 2'd0;
    ix_src_sel = IXS_IMM;
    ix_src_reg = 2'd0;
    ix_imm     = 8'd0;
    er_load    = 1'b0;
    er_l_sel   = s_idx[3:2];
    er_shift6  = 1'b0;
    er_rd      = 1'b0;
    er_raddr   = {ra, s_idx[6:4]};
    done       = 1'b0;
    full_cmp   = 1'b0;
    decided    = 1'b0;
    m_dec      = m;

    unique case (st)
      M_IDLE: if (start) begin
        seq_start   = 1'b1;
        seq_op      = SQ_CLR8;
        seq_nfields = nfields;
        ix_op       = IX_LOAD;
        ix_imm      = {1'b0, len_chunks[4:0] - 5'd1, 2'b00};
        st_n        = M_CLR;
      end
      M_CLR: if (seq_done) st_n = M_LOADER;
      M_LOADER: begin
        er_rd     = 1'b1;
        er_load   = 1'b1;
        ix_op     = IX_ADD;
        ix_imm    = 8'hFC;            // S := S - 1 (one 24-bit part)
        seq_start = 1'b1;
        seq_op    = SQ_MULACC;
        seq_rsel  = rb;
        seq_e     = {2'b00, r128_rdata[24*s_idx[3:2] + 18 +: 6]};
        d_n       = 2'd0;
        st_n      = M_MUL;
      end
      M_MUL: if (seq_done) begin
        er_shift6 = 1'b1;
        m_n       = 7'd0;
        bitpos_n  = 3'd6;
        seq_start = 1'b1;
        seq_op    = SQ_TOPCMP;
        seq_e     = 8'd64;
        st_n      = M_SEARCH;
      end
      M_SEARCH: if (seq_done) begin
        unique case (top_res)
          TOP_ACCEPT: begin decided = 1'b1; m_dec = trial; end
          TOP_REJECT: begin decided = 1'b1; m_dec = m; end
          default: begin
            seq_start = 1'b1;
            seq_op    = SQ_CMP;
            seq_e     = {1'b0, trial};
            full_cmp  = 1'b1;
            st_n      = M_FULL;
          end
        endcase
      end
      M_FULL: if (seq_done) begin
        decided = 1'b1;
        m_dec   = cmp_neg ? m : trial;
      end
      M_RED: if (seq_done) begin
        if (d == 2'd3) begin
          st_n = s_idx[7] ? M_FIN : M_LOADER;
        end else begin
          d_n       = d + 2'd1;
          seq_start = 1'b1;
          seq_op    = SQ_MULACC;
          seq_rsel  = rb;
          seq_e     = {2'b00, er_top6};
          st_n      = M_MUL;
        end
      end
      M_FIN: begin
        done = 1'b1;
        st_n = M_IDLE;
      end
      default: st_n = M_IDLE;
    endcase

    // next step of the binary search, or the reduction when all 7 bits are known
    if (decided) begin
      m_n       = m_dec;
      seq_start = 1'b1;
      if (bitpos == 3'd0) begin
        seq_op = SQ_REDUCE;
        seq_e  = {1'b0, m_dec};
        st_n   = M_RED;
      end else begin
        bitpos_n = bitpos - 3'd1;
        seq_op   = SQ_TOPCMP;
        seq_e    = {1'b0, m_dec | (7'd1 << (bitpos - 3'd1))};
        st_n     = M_SEARCH;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= M_IDLE;
      d      <= '0;
      m      <= '0;
      bitpos <= '0;
      ra     <= '0;
      rb     <= '0;
      rc     <= '0;
      nf     <= 4'd8;
    end else begin
      st     <= st_n;
      d      <= d_n;
      m      <= m_n;
      bitpos <= bitpos_n;
      if (st == M_IDLE && start) begin
        ra <= reg_a;
        rb <= reg_b;
        rc <= reg_c;
        nf <= nfields;
      end
    end
  end

  assign busy       = (st != M_IDLE);
  assign state_code = {st, d, bitpos};
endmodule
