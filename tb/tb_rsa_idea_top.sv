// End-to-end testbench of the encryption engine at its full size
// (768-bit registers, 8 fields), driven only through the command pins.
//  1. single arithmetic commands (load, add, subtract, negate, store)
//  2. reduction of an operand: A mod C as A * 1 mod C
//  3. 768-bit modular multiplies, checked against wide-integer arithmetic
//     and against the 2985-cycle time (2944 cycles of digit work)
//  4. RSA encryption with public exponent 65537 by square-and-multiply
//     (16 squarings, 1 multiply), checked against a modular power here
//  5. a short modulus with a tiny top field, forcing the full compare
//  6. IDEA encryption and decryption (published test vector and random),
//     50 cycles each, on the same ALU, interleaved with modular work
//  7. PRNG words written to RAM, and the self-test signature (zero outside
//     test mode, reproducible from reset, folded every 255 states)
//  8. single index register and ER commands from the host against a model
//     (every operation and source, indexed ER loads, both digit widths, the
//     compare flag), and a host-run bit-serial program: counting the set
//     bits of 24-bit parts with ER right shifts; multiply-accumulate with
//     the multiplier taken from the ER digit mux (6 and 8 bits)
// Every mechanism is counted and must have happened at least once.
module tb_rsa_idea_top
  import rsaidea_pkg::*;
  import idea_ref_pkg::*;
;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmd_valid, cmd_ready, cmd_done, test_mode;
  logic [4:0]  cmd;
  logic [6:0]  addr;
  logic [95:0] wdata, rdata;
  logic [3:0]  reg_a, reg_b, reg_c, nfields, seq_op;
  logic [5:0]  len_chunks;
  logic [7:0]  seq_e, ext;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_full = 0, n_accept = 0, n_reject = 0, n_unsure = 0, n_fold = 0;
  int n_modmul = 0, n_idea = 0, n_seq = 0, n_rand = 0, n_sig = 0, n_switch = 0;
  int n_ix = 0, n_erld = 0, n_shr = 0, n_cmpflag = 0, n_erdigit = 0;
  logic last_idea = 1'b0;

  rsa_idea_top dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .cmd_done, .addr, .wdata,
                    .rdata, .reg_a, .reg_b, .reg_c, .len_chunks, .nfields, .seq_op, .seq_e,
                    .test_mode, .ext);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_mm.full_cmp) n_full++;
    if (dut.u_mm.busy && dut.u_seq.done && dut.u_seq.op_q == SQ_TOPCMP) begin
      if (dut.u_seq.top_res == TOP_ACCEPT) n_accept++;
      else if (dut.u_seq.top_res == TOP_REJECT) n_reject++;
      else n_unsure++;
    end
    if (dut.u_st.fold) n_fold++;
    // ALU switched between long-number and IDEA use
    if (dut.idea_busy != last_idea) n_switch++;
    last_idea <= dut.idea_busy;
  end

  task automatic command(input hl_cmd_e c, output int cycles);
    @(negedge clk);
    cmd = c; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    cycles = 1;
    while (!cmd_done && cycles < 100000) begin @(negedge clk); cycles++; end
  endtask

  task automatic write_reg(input int r, input logic [767:0] v);
    int cyc;
    for (int f = 0; f < 8; f++) begin
      addr = 7'(8 * r + f); wdata = v[96*f +: 96];
      command(HC_WR128, cyc);
    end
  endtask

  task automatic read_reg(input int r, output logic [767:0] v);
    int cyc;
    for (int f = 0; f < 8; f++) begin
      addr = 7'(8 * r + f);
      command(HC_RD128, cyc);
      v[96*f +: 96] = rdata;
    end
  endtask

  task automatic read_p(output logic [767:0] v);
    int cyc;
    for (int f = 0; f < 8; f++) begin
      addr = 7'(f);
      command(HC_RD8, cyc);
      v[96*f +: 96] = rdata;
    end
  endtask

  task automatic seq(input seq_op_e o, input int r, input int nf);
    int cyc;
    seq_op = 4'(o); reg_a = 4'd0; reg_b = 4'(r); nfields = 4'(nf); seq_e = 8'd0;
    command(HC_SEQ, cyc);
    n_seq++;
    checks++;
    if (cyc != nf + 1) begin failures++; $display("FAIL seq %s took %0d", o.name(), cyc); end
  endtask

  // RAM8 := A * B mod C, A/B/C in registers ra/rb/rc; returns cycles
  task automatic modmul(input int ra, input int rb, input int rc, input int nf, input int len,
                        output int cyc);
    reg_a = 4'(ra); reg_b = 4'(rb); reg_c = 4'(rc); nfields = 4'(nf); len_chunks = 6'(len);
    command(HC_MODMUL, cyc);
    cyc = cyc - 1;   // the decoder's done state
    n_modmul++;
  endtask

  function automatic logic [767:0] rnd(input int bits);
    logic [767:0] v;
    for (int i = 0; i < 24; i++) v[32*i +: 32] = $urandom;
    return (bits >= 768) ? v : (v & ((768'd1 << bits) - 768'd1));
  endfunction

  function automatic logic [767:0] mulmod(input logic [767:0] a, input logic [767:0] b,
                                          input logic [767:0] c);
    logic [1535:0] t;
    t = ({768'd0, a} * {768'd0, b}) % {768'd0, c};
    return t[767:0];
  endfunction

  task automatic expect768(input string what, input logic [767:0] got, input logic [767:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s\n got %h\n exp %h", what, got, exp);
    end
  endtask

  task automatic idea(input logic [63:0] blk, input int base, output logic [63:0] res);
    int cyc;
    wdata = {32'd0, blk}; addr = 7'(base);
    command(HC_IDEA, cyc);
    n_idea++;
    res = rdata[63:0];
    checks++;
    if (cyc != 52) begin failures++; $display("FAIL IDEA command took %0d cycles", cyc); end
  endtask

  task automatic load_keys(input key52_t z, input int base);
    int cyc;
    for (int w = 0; w < 9; w++) begin
      addr = 7'(base + w); wdata = key_word(z, w);
      command(HC_WR128, cyc);
    end
  endtask

  // status word: {compare flag, ext, digit, ER, index registers}
  task automatic stat(input logic w8, output logic [3:0][7:0] ix, output logic [23:0] er,
                      output logic [7:0] dig, output logic flag);
    int cyc;
    seq_e = {7'd0, w8};
    command(HC_STAT, cyc);
    ix = rdata[31:0]; er = rdata[55:32]; dig = rdata[63:56]; flag = rdata[72];
  endtask

  task automatic ix_cmd(input ix_op_e o, input int dst, input ix_src_e src, input int sreg,
                        input logic [7:0] imm);
    int cyc;
    seq_op = 4'(o); reg_a = 4'(dst); reg_c = 4'(src); reg_b = 4'(sreg); seq_e = imm;
    command(HC_IX, cyc);
    n_ix++;
  endtask

  task automatic er_cmd(input er_op_e o, input int ptr, input int r);
    int cyc;
    seq_op = 4'(o); reg_a = 4'(ptr); reg_b = 4'(r);
    command(HC_ER, cyc);
    if (o == ER_LOAD) n_erld++;
    if (o == ER_SHR1) n_shr++;
  endtask

  task automatic read_sig(output logic [31:0] s);
    int cyc;
    command(HC_SIGRD, cyc);
    s = rdata[31:0];
    n_sig++;
  endtask

  initial begin
    logic [767:0] a, b, c, m, x, got, one_r;
    logic [63:0]  ct, pt, blk;
    logic [31:0]  sig1, sig2, sig0;
    key52_t ek, dk;
    int cyc;
    cmd_valid = 0; cmd = 0; addr = 0; wdata = 0; reg_a = 0; reg_b = 0; reg_c = 0;
    nfields = 8; seq_op = 0; seq_e = 0; len_chunks = 32; test_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. single arithmetic commands
    a = rnd(768); b = rnd(768);
    write_reg(1, a); write_reg(2, b);
    seq(SQ_LOAD8, 1, 8);
    seq(SQ_ADD, 2, 8);
    read_p(got);
    expect768("ADD", got, a + b);
    checks++;
    if (ext !== 8'(({1'b0, a} + {1'b0, b}) >> 768)) begin failures++; $display("FAIL ADD carry"); end
    seq(SQ_SUB, 2, 8);
    seq(SQ_SUB, 1, 8);
    read_p(got);
    expect768("SUB", got, 768'd0);
    seq(SQ_LOAD8, 2, 8);
    seq(SQ_STORE8, 4, 8);
    seq(SQ_NEG, 4, 8);
    read_reg(4, got);
    expect768("NEG", got, 768'd0 - b);

    // ---- 2. operand reduction: A mod C = A * 1 mod C
    c = rnd(768) | (768'd1 << 767);
    a = rnd(768) | (768'd1 << 767);
    one_r = 768'd1;
    write_reg(1, a); write_reg(3, c); write_reg(5, one_r);
    modmul(1, 5, 3, 8, 32, cyc);
    read_p(got);
    expect768("A mod C", got, a % c);

    // ---- 3. 768-bit modular multiplies with the cycle count
    for (int i = 0; i < 3; i++) begin
      a = rnd(768); b = rnd(768) % c;
      write_reg(1, a); write_reg(2, b);
      modmul(1, 2, 3, 8, 32, cyc);
      read_p(got);
      expect768("modmul 768", got, mulmod(a, b, c));
      checks++;
      if (cyc != 2985) begin failures++; $display("FAIL modmul took %0d cycles, not 2985", cyc); end
    end

    // ---- 6a. IDEA between modular work: published vector
    ek = enc_keys(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    dk = dec_keys(ek);
    load_keys(ek, 96);
    load_keys(dk, 112);
    idea(64'h0000_0001_0002_0003, 96, ct);
    checks++;
    if (ct !== 64'h11FB_ED2B_0198_6DE5) begin failures++; $display("FAIL IDEA vector %h", ct); end
    idea(ct, 112, pt);
    checks++;
    if (pt !== 64'h0000_0001_0002_0003) begin failures++; $display("FAIL IDEA decrypt %h", pt); end

    // ---- 4. RSA encryption, exponent 65537, modulus C (register 3)
    m = rnd(768) % c;
    write_reg(1, m);          // message
    // X := M, sixteen squarings give M^65536, one multiply M^65537
    write_reg(4, m);
    for (int k = 0; k < 16; k++) begin
      modmul(4, 4, 3, 8, 32, cyc);
      seq(SQ_STORE8, 4, 8);
    end
    modmul(4, 1, 3, 8, 32, cyc);       // X := X * M mod C
    seq(SQ_STORE8, 4, 8);
    read_reg(4, got);
    x = m;
    for (int k = 0; k < 16; k++) x = mulmod(x, x, c);
    x = mulmod(x, m, c);
    expect768("RSA m^65537 mod n", got, x);

    // ---- 5. short modulus with a tiny top field: full compares
    for (int i = 0; i < 4; i++) begin
      c = (768'd1 << 96) | rnd(96);
      a = rnd(192); b = rnd(192) % c;
      write_reg(1, a); write_reg(2, b); write_reg(3, c);
      modmul(1, 2, 3, 2, 8, cyc);
      read_p(got);
      expect768("modmul tiny top field", got & ((768'd1 << 192) - 1), mulmod(a, b, c));
    end

    // ---- 6b. random IDEA keys and blocks
    for (int i = 0; i < 4; i++) begin
      ek = enc_keys({$urandom, $urandom, $urandom, $urandom});
      dk = dec_keys(ek);
      load_keys(ek, 96);
      load_keys(dk, 112);
      blk = {$urandom, $urandom};
      idea(blk, 96, ct);
      checks++;
      if (ct !== cipher(blk, ek)) begin failures++; $display("FAIL IDEA encrypt"); end
      idea(ct, 112, pt);
      checks++;
      if (pt !== blk) begin failures++; $display("FAIL IDEA decrypt"); end
    end

    // ---- 7. PRNG words into RAM128 and the self-test signature
    for (int i = 0; i < 3; i++) begin
      logic [95:0] w;
      addr = 7'(80 + i);
      command(HC_RAND, cyc);
      n_rand++;
      command(HC_RD128, cyc);
      w = rdata;
      checks++;
      if (w == 96'd0 || (i > 0 && w == dut.u_ram128.mem[79 + i])) begin
        failures++; $display("FAIL PRNG word %h", w);
      end
    end
    test_mode = 1'b0;
    read_sig(sig0);
    checks++;
    if (sig0 !== 32'd0) begin failures++; $display("FAIL signature visible outside test mode"); end
    test_mode = 1'b1;
    read_sig(sig1);
    checks++;
    if (sig1 == 32'd0) begin failures++; $display("FAIL signature is zero"); end

    // ---- 8. index register and ER commands from the host ----
    begin
      logic [3:0][7:0] mi, gi;
      logic [23:0] mer, ger;
      logic [7:0]  gd, src, ed;
      logic        gf;
      logic [767:0] word;
      int pc;
      write_reg(5, rnd(768));
      read_reg(5, word);
      stat(1'b0, mi, mer, gd, gf);
      for (int t = 0; t < 300; t++) begin
        int o, d, sr, ss, p;
        logic [7:0] imm;
        case ($urandom % 3)
          0: begin    // index command
            o = 1 + ($urandom % 5); d = $urandom % 4; ss = $urandom % 3; sr = $urandom % 4;
            imm = 8'($urandom);
            src = (ss == 1) ? mi[sr] : (ss == 2) ? mer[7:0] : imm;
            ix_cmd(ix_op_e'(o), d, ix_src_e'(ss), sr, imm);
            case (o)
              1: mi[d] = src;          2: mi[d] = mi[d] + src;
              3: mi[d] = mi[d] & src;  4: mi[d] = mi[d] | src;
              default: mi[d] = mi[d] ^ src;
            endcase
          end
          1: begin    // ER load from the part an index register points at
            p = $urandom % 4;
            er_cmd(ER_LOAD, p, 5);
            mer = word[96 * mi[p][6:4] + 24 * mi[p][3:2] +: 24];
          end
          default: begin
            if ($urandom % 2) begin er_cmd(ER_SHR1, 0, 0); mer = mer >> 1; end
            else              begin er_cmd(ER_SHL6, 0, 0); mer = mer << 6; end
          end
        endcase
        stat(t[0], gi, ger, gd, gf);
        if (t[0]) ed = (mi[0][1:0] == 2'd3) ? 8'd0 : mer[8 * mi[0][1:0] +: 8];
        else      ed = {2'd0, mer[6 * mi[0][1:0] +: 6]};
        checks++;
        if (gi !== mi || ger !== mer || gd !== ed) begin
          failures++;
          $display("FAIL index/ER step %0d: idx %h/%h ER %h/%h digit %h/%h", t, gi, mi,
                   ger, mer, gd, ed);
        end
      end
      // bit-serial program: count the set bits of each 24-bit part of field 2
      for (int l = 0; l < 4; l++) begin
        ix_cmd(IX_LOAD, 1, IXS_IMM, 0, 8'(8'h20 + 4 * l));
        er_cmd(ER_LOAD, 1, 5);
        pc = 0;
        for (int b = 0; b < 24; b++) begin
          stat(1'b0, gi, ger, gd, gf);
          pc += int'(ger[0]);
          er_cmd(ER_SHR1, 0, 0);
        end
        checks++;
        if (pc != $countones(word[192 + 24 * l +: 24])) begin
          failures++; $display("FAIL bit count of part %0d: %0d", l, pc);
        end
      end
      // compare flag: P < R and P >= R
      for (int k = 0; k < 4; k++) begin
        logic [767:0] a, b;
        a = rnd(700); b = rnd(700);
        write_reg(6, a); write_reg(7, b);
        seq(SQ_LOAD8, 6, 8);
        seq_op = 4'(SQ_CMP); reg_a = 4'd0; reg_b = 4'd7; nfields = 4'd8; seq_e = 8'd1;
        command(HC_SEQ, cyc);
        stat(1'b0, gi, ger, gd, gf);
        checks++; n_cmpflag++;
        if (gf !== (a < b)) begin failures++; $display("FAIL compare flag %b", gf); end
      end
    end

    // multiplier from the ER digit mux: P := 0; P := 64*P + digit * R
    for (int k = 0; k < 8; k++) begin
      logic [767:0] v, got;
      logic [7:0]   dg, i1, i0;
      logic [3:0][7:0] gi;
      logic [23:0]  ger;
      logic         gf;
      v  = rnd(700);
      i1 = 8'($urandom) & 8'h7f; i0 = 8'($urandom % 4);
      write_reg(6, v);
      ix_cmd(IX_LOAD, 1, IXS_IMM, 0, i1);
      ix_cmd(IX_LOAD, 0, IXS_IMM, 0, i0);
      er_cmd(ER_LOAD, 1, 6);
      stat(k[0], gi, ger, dg, gf);
      seq(SQ_CLR8, 0, 8);
      seq_op = 4'(SQ_MULACC); reg_a = {1'b1, k[0], 2'b00}; reg_b = 4'd6; nfields = 4'd8;
      seq_e = 8'($urandom);   // must be ignored
      command(HC_SEQ, cyc);
      reg_a = 4'd0;
      read_p(got);
      expect768("multiply by ER digit", got, v * {760'd0, dg});
      checks++; n_erdigit++;
      if (dg !== (k[0] ? ((i0[1:0] == 2'd3) ? 8'd0 : ger[8 * i0[1:0] +: 8])
                       : {2'd0, ger[6 * i0[1:0] +: 6]})) begin
        failures++; $display("FAIL ER digit %h", dg);
      end
    end

    // the same program from reset must give the same signature
    for (int rep = 0; rep < 2; rep++) begin
      rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1;
      write_reg(1, 768'd12345); write_reg(2, 768'd678); write_reg(3, 768'd1000003);
      modmul(1, 2, 3, 2, 8, cyc);   // long enough for a fold (255 states)
      idea(64'h0000_0001_0002_0003, 96, ct);
      read_sig(sig2);
      if (rep == 0) sig1 = sig2;
    end
    checks++;
    if (sig1 !== sig2 || sig2 == 0) begin
      failures++; $display("FAIL signature not reproducible %h %h", sig1, sig2);
    end

    $display("mechanisms: modmul %0d, top accept %0d, reject %0d, unsure %0d, full compare %0d,",
             n_modmul, n_accept, n_reject, n_unsure, n_full);
    $display("            IDEA %0d, ALU switches %0d, arithmetic commands %0d, PRNG %0d,",
             n_idea, n_switch, n_seq, n_rand);
    $display("            signature reads %0d, signature folds %0d", n_sig, n_fold);
    $display("            index commands %0d, ER loads %0d, ER right shifts %0d, compare flags %0d",
             n_ix, n_erld, n_shr, n_cmpflag);
    $display("            multiplies by the ER digit %0d", n_erdigit);
    if (n_modmul == 0 || n_accept == 0 || n_reject == 0 || n_unsure == 0 || n_full == 0 ||
        n_idea == 0 || n_switch == 0 || n_seq == 0 || n_rand == 0 || n_sig == 0 || n_fold == 0 ||
        n_ix == 0 || n_erld == 0 || n_shr == 0 || n_cmpflag == 0 ||
        n_erdigit == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
