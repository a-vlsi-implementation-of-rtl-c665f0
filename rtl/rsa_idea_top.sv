// rsa_idea_top: single-chip RSA / IDEA encryption engine.
//
// One 96-bit ALU (four 24-bit slices) is shared by long-number modular
// arithmetic for RSA (768-bit registers, processed one 96-bit field per
// cycle) and by the IDEA block cipher (16-bit multiplications mod 2^16+1).
// Datapath (Fig. 3 of the design): RAM8 (one 768-bit register, the
// accumulator), RAM128 (sixteen 768-bit registers and the IDEA subkeys),
// the 24-bit register ER and the ALU. Control (Fig. 5): the external
// command decoder starts the ALU sequencer (single arithmetic commands),
// the modular multiply sequencer (which drives the ALU sequencer,
// INDEX_CALC and ER) or the IDEA sequencer. All state machines are hashed
// by the self-test block; a test PRNG can fill RAM128 words.
//
// Host interface (all synchronous to clk, active-low synchronous reset):
//   cmd / cmd_valid / cmd_ready / cmd_done: one command at a time, see
//     high_level_commands. Operands: addr (RAM word address, or IDEA key
//     base), wdata (RAM word, or IDEA block in wdata[63:0]), reg_a/b/c and
//     len_chunks/nfields (modular multiply), seq_op/reg_b/seq_e/nfields
//     (single arithmetic command on RAM128 register reg_b).
//   HC_IX / HC_ER: one index register or ER command (the microcode's index
//     commands; HC_SEQ gives its arithmetic ones), for host-run programs
//     such as division and bit operations (operand fields below).
//   rdata: result of the last read, signature read, status read or IDEA
//     transform, valid from the cycle of cmd_done. For HC_SEQ, reg_a[3]
//     takes the multiplier e from the ER digit mux instead of seq_e (digit j
//     of index register 0, 8 bits wide if reg_a[2] else 6). HC_STAT returns
//     {23'0, compare flag, ext, digit, ER, index registers 3..0}; the digit
//     is digit j of index register 0, 8 bits wide if seq_e[0] else 6.
//   ext: 8-bit extension of the RAM8 register (carry / sign above bit 767).
//   test_mode: enables the signature readout.
// Operands must be held stable from cmd_valid until cmd_done.
// The sharing of the ALU and RAM ports is arbitrated by which sequencer is
// busy; as only one command runs at a time, no two want the same port.
// Some block outputs are left unconnected on purpose: the ALU sequencer's
// ready/busy (the multiply sequencer and decoder use done), and the
// full-compare pulse of the multiply sequencer and the self-test state count
// (status only, observed by the testbenches).
module rsa_idea_top
  import rsaidea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [4:0]  cmd,
  output logic        cmd_ready,
  output logic        cmd_done,
  input  logic [6:0]  addr,
  input  logic [95:0] wdata,
  output logic [95:0] rdata,
  input  logic [3:0]  reg_a,
  input  logic [3:0]  reg_b,
  input  logic [3:0]  reg_c,
  input  logic [5:0]  len_chunks,
  input  logic [3:0]  nfields,
  input  logic [3:0]  seq_op,
  input  logic [7:0]  seq_e,
  input  logic        test_mode,
  output logic [7:0]  ext
);
  // ---------------- command decoder ----------------
  logic host_wr128, host_rd128, host_wr8, host_rd8, host_rand, host_sig;
  logic host_ix, host_er, host_stat;
  logic seq_go, mm_go, idea_go;
  logic seq_done, mm_done, idea_done, mm_busy, idea_busy;
  logic [3:0][7:0] fsm_state;

  high_level_commands u_hlc (
    .clk, .rst_n, .cmd_valid, .cmd(hl_cmd_e'(cmd)), .cmd_ready, .cmd_done,
    .host_wr128, .host_rd128, .host_wr8, .host_rd8, .host_rand, .host_sig,
    .host_ix, .host_er, .host_stat,
    .seq_go, .seq_done, .mm_go, .mm_done, .idea_go, .idea_done,
    .state_code(fsm_state[0])
  );

  // ---------------- memories ----------------
  logic [2:0]  r8_addr;
  logic        r8_we;
  logic [95:0] r8_wdata, r8_rdata;
  logic [6:0]  r128_raddr, r128_waddr;
  logic        r128_we;
  logic [95:0] r128_wdata, r128_rdata;

  ram8   #(.DEPTH(RAM8_DEPTH))   u_ram8   (.clk, .we(r8_we), .waddr(r8_addr), .wdata(r8_wdata),
                   .raddr(r8_addr), .rdata(r8_rdata));
  ram128 #(.DEPTH(RAM128_DEPTH)) u_ram128 (.clk, .we(r128_we), .waddr(r128_waddr), .wdata(r128_wdata),
                   .raddr(r128_raddr), .rdata(r128_rdata));

  // ---------------- ALU sequencer ----------------
  logic        sq_start, sq_ready, sq_busy, sq_done, sq_cmp_neg;
  seq_op_e     sq_op;
  logic [3:0]  sq_rsel, sq_nf;
  logic [7:0]  sq_e;
  top_res_e    sq_top;
  logic [2:0]  sq_r8_addr;
  logic        sq_r8_we, sq_r128_we;
  logic [95:0] sq_r8_wdata, sq_r128_wdata;
  logic [6:0]  sq_r128_raddr, sq_r128_waddr;
  alu_req_t    sq_alu_req, id_alu_req, alu_req;
  alu_rsp_t    alu_rsp;

  alu_sequencer u_seq (
    .clk, .rst_n, .start(sq_start), .op(sq_op), .rsel(sq_rsel), .e(sq_e),
    .nfields(sq_nf), .ready(sq_ready), .busy(sq_busy), .done(sq_done),
    .top_res(sq_top), .cmp_neg(sq_cmp_neg), .ext,
    .r8_addr(sq_r8_addr), .r8_we(sq_r8_we), .r8_wdata(sq_r8_wdata), .r8_rdata,
    .r128_raddr(sq_r128_raddr), .r128_we(sq_r128_we), .r128_waddr(sq_r128_waddr),
    .r128_wdata(sq_r128_wdata), .r128_rdata,
    .alu_req(sq_alu_req), .alu_rsp, .state_code(fsm_state[1])
  );

  // ---------------- modular multiply, INDEX_CALC, ER ----------------
  logic        mm_seq_start;
  seq_op_e     mm_seq_op;
  logic [3:0]  mm_seq_rsel, mm_seq_nf;
  logic [7:0]  mm_seq_e;
  ix_op_e      ix_op, mm_ix_op;
  logic [1:0]  ix_dst, ix_src_reg, mm_ix_dst, mm_ix_src_reg;
  ix_src_e     ix_src_sel, mm_ix_src_sel;
  logic [7:0]  ix_imm, mm_ix_imm;
  logic [3:0][7:0] idx;
  logic        er_load, er_shift6, er_shr1, er_rd, mm_full_cmp;
  logic        mm_er_load, mm_er_shift6, mm_er_rd;
  logic [1:0]  er_l_sel, mm_er_l_sel;
  logic [23:0] er;
  logic [7:0]  er_digit;
  logic [5:0]  er_top6;
  logic [6:0]  er_raddr, mm_er_raddr;
  logic        cmp_flag;

  modmul_ctrl u_mm (
    .clk, .rst_n, .start(mm_go), .reg_a, .reg_b, .reg_c, .len_chunks, .nfields,
    .busy(mm_busy), .done(mm_done), .full_cmp(mm_full_cmp),
    .seq_start(mm_seq_start), .seq_op(mm_seq_op), .seq_rsel(mm_seq_rsel),
    .seq_e(mm_seq_e), .seq_nfields(mm_seq_nf), .seq_done(sq_done),
    .top_res(sq_top), .cmp_neg(sq_cmp_neg),
    .ix_op(mm_ix_op), .ix_dst(mm_ix_dst), .ix_src_sel(mm_ix_src_sel),
    .ix_src_reg(mm_ix_src_reg), .ix_imm(mm_ix_imm), .idx,
    .er_load(mm_er_load), .er_l_sel(mm_er_l_sel), .er_shift6(mm_er_shift6),
    .er_top6, .er_rd(mm_er_rd), .er_raddr(mm_er_raddr), .r128_rdata,
    .state_code(fsm_state[2])
  );

  // INDEX_CALC and ER take single commands from the host (HC_IX, HC_ER)
  // when the modular multiply is idle. HC_IX: op = seq_op[2:0],
  // dst = reg_a[1:0], src_reg = reg_b[1:0], src_sel = reg_c[1:0],
  // imm = seq_e. HC_ER: op = seq_op[1:0] (er_op_e); a load reads RAM128
  // register reg_b, field and part given by index register reg_a[1:0].
  always_comb begin
    if (host_ix) begin
      ix_op      = ix_op_e'(seq_op[2:0]);
      ix_dst     = reg_a[1:0];
      ix_src_sel = ix_src_e'(reg_c[1:0]);
      ix_src_reg = reg_b[1:0];
      ix_imm     = seq_e;
    end else begin
      ix_op      = mm_ix_op;
      ix_dst     = mm_ix_dst;
      ix_src_sel = mm_ix_src_sel;
      ix_src_reg = mm_ix_src_reg;
      ix_imm     = mm_ix_imm;
    end
    if (host_er) begin
      er_load   = er_op_e'(seq_op[1:0]) == ER_LOAD;
      er_shift6 = er_op_e'(seq_op[1:0]) == ER_SHL6;
      er_shr1   = er_op_e'(seq_op[1:0]) == ER_SHR1;
      er_rd     = er_load;
      er_l_sel  = idx[reg_a[1:0]][3:2];
      er_raddr  = {reg_b, idx[reg_a[1:0]][6:4]};
    end else begin
      er_load   = mm_er_load;
      er_shift6 = mm_er_shift6;
      er_shr1   = 1'b0;
      er_rd     = mm_er_rd;
      er_l_sel  = mm_er_l_sel;
      er_raddr  = mm_er_raddr;
    end
  end

  index_calc u_ix (
    .clk, .rst_n, .op(ix_op), .dst(ix_dst), .src_sel(ix_src_sel),
    .src_reg(ix_src_reg), .imm(ix_imm), .er_low(er[7:0]), .idx
  );

  er_unit u_er (
    .clk, .rst_n, .load(er_load), .l_sel(er_l_sel), .word(r128_rdata),
    .shift6(er_shift6), .shr1(er_shr1), .digit_w8(host_stat ? seq_e[0] : reg_a[2]),
    .j_sel(idx[0][1:0]),
    .er, .digit(er_digit), .top6(er_top6)
  );

  // the sequencer takes commands from the modular multiply while it runs,
  // otherwise from the host
  always_comb begin
    if (mm_busy || mm_go) begin
      sq_start = mm_seq_start;
      sq_op    = mm_seq_op;
      sq_rsel  = mm_seq_rsel;
      sq_e     = mm_seq_e;
      sq_nf    = mm_seq_nf;
    end else begin
      sq_start = seq_go;
      sq_op    = seq_op_e'(seq_op);
      sq_rsel  = reg_b;
      sq_e     = reg_a[3] ? er_digit : seq_e;   // Fig. 3: e from the ER mux
      sq_nf    = nfields;
    end
  end
  assign seq_done = sq_done;

  // result of the last compare, readable with HC_STAT
  always_ff @(posedge clk) begin
    if (!rst_n)                            cmp_flag <= 1'b0;
    else if (sq_done && !mm_busy && sq_op == SQ_CMP) cmp_flag <= sq_cmp_neg;
  end

  // ---------------- IDEA ----------------
  logic [63:0] idea_dout;
  logic [6:0]  key_addr;

  idea_core u_idea (
    .clk, .rst_n, .start(idea_go), .key_base(addr), .din(wdata[63:0]),
    .dout(idea_dout), .busy(idea_busy), .done(idea_done),
    .key_addr, .key_word(r128_rdata), .alu_req(id_alu_req), .alu_rsp,
    .state_code(fsm_state[3])
  );

  // ---------------- shared ALU ----------------
  assign alu_req = idea_busy ? id_alu_req : sq_alu_req;
  alu u_alu (.req(alu_req), .rsp(alu_rsp));

  // ---------------- self-test and PRNG ----------------
  logic [31:0] signature;
  logic [7:0]  st_count;
  logic [95:0] rand_word;

  self_test #(.NFSM(4)) u_st (
    .clk, .rst_n, .en(!cmd_ready), .state(fsm_state), .test_mode,
    .signature, .count(st_count)
  );

  prng u_prng (.clk, .rst_n, .next(host_rand), .load(1'b0), .seed('0),
               .word(rand_word));

  // ---------------- RAM port arbitration ----------------
  always_comb begin
    // RAM8
    r8_addr  = (host_wr8 || host_rd8) ? addr[2:0] : sq_r8_addr;
    r8_we    = host_wr8 || sq_r8_we;
    r8_wdata = host_wr8 ? wdata : sq_r8_wdata;
    // RAM128 read
    if (idea_busy)       r128_raddr = key_addr;
    else if (er_rd)      r128_raddr = er_raddr;
    else if (host_rd128) r128_raddr = addr;
    else                 r128_raddr = sq_r128_raddr;
    // RAM128 write
    if (host_wr128 || host_rand) begin
      r128_we    = 1'b1;
      r128_waddr = addr;
      r128_wdata = host_rand ? rand_word : wdata;
    end else begin
      r128_we    = sq_r128_we;
      r128_waddr = sq_r128_waddr;
      r128_wdata = sq_r128_wdata;
    end
  end

  // ---------------- read-back register ----------------
  always_ff @(posedge clk) begin
    if (!rst_n)          rdata <= '0;
    else if (host_rd128) rdata <= r128_rdata;
    else if (host_rd8)   rdata <= r8_rdata;
    else if (host_sig)   rdata <= {64'd0, signature};
    else if (host_stat)  rdata <= {23'd0, cmp_flag, ext, er_digit, er, idx};
    else if (idea_done)  rdata <= {32'd0, idea_dout};
  end
endmodule
