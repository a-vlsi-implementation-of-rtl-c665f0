// Self-checking testbench of alu_sequencer, run with the ALU and both RAMs.
// Random register contents and random register lengths (1..8 fields);
// every command's result (RAM8 with its extension, or the RAM128 register)
// is compared with wide-integer arithmetic done here, modulo
// 2^(96*nfields+8) for P and 2^(96*nfields) for R, and every command must
// finish in nfields cycles (one for TOPCMP). Top-field compares are made
// to hit all three outcomes and are checked both against the estimate and
// against the exact comparison they must be consistent with.
module tb_alu_sequencer;
  import rsaidea_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start, ready, busy, done, cmp_neg;
  seq_op_e     op;
  logic [3:0]  rsel, nfields;
  logic [7:0]  e, ext;
  top_res_e    top_res;
  logic [2:0]  s_r8_addr;
  logic        s_r8_we, s_r128_we;
  logic [95:0] s_r8_wdata, s_r128_wdata, r8_rdata, r128_rdata;
  logic [6:0]  s_r128_raddr, s_r128_waddr;
  alu_req_t    alu_req;
  alu_rsp_t    alu_rsp;
  logic [7:0]  state_code;
  // testbench access to the RAMs while the sequencer is idle
  logic        tb_own, tb_we8, tb_we128;
  logic [6:0]  tb_addr;
  logic [95:0] tb_wdata;

  int checks = 0, failures = 0;
  int n_top[3];

  alu_sequencer dut (
    .clk, .rst_n, .start, .op, .rsel, .e, .nfields, .ready, .busy, .done,
    .top_res, .cmp_neg, .ext,
    .r8_addr(s_r8_addr), .r8_we(s_r8_we), .r8_wdata(s_r8_wdata), .r8_rdata,
    .r128_raddr(s_r128_raddr), .r128_we(s_r128_we), .r128_waddr(s_r128_waddr),
    .r128_wdata(s_r128_wdata), .r128_rdata, .alu_req, .alu_rsp, .state_code
  );
  alu u_alu (.req(alu_req), .rsp(alu_rsp));
  ram8 u_r8 (.clk, .we(tb_own ? tb_we8 : s_r8_we), .waddr(tb_own ? tb_addr[2:0] : s_r8_addr),
             .wdata(tb_own ? tb_wdata : s_r8_wdata), .raddr(tb_own ? tb_addr[2:0] : s_r8_addr),
             .rdata(r8_rdata));
  ram128 u_r128 (.clk, .we(tb_own ? tb_we128 : s_r128_we), .waddr(tb_own ? tb_addr : s_r128_waddr),
                 .wdata(tb_own ? tb_wdata : s_r128_wdata), .raddr(tb_own ? tb_addr : s_r128_raddr),
                 .rdata(r128_rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // models
  logic [775:0] pm;          // {ext, RAM8}
  logic [767:0] rm [16];

  function automatic logic [775:0] pmask(input int nf);
    return (776'd1 << (96 * nf + 8)) - 776'd1;
  endfunction

  function automatic logic [767:0] lm(input int nf);
    return 768'((776'd1 << (96 * nf)) - 776'd1);
  endfunction

  function automatic logic [767:0] rand768(input int nf);
    logic [767:0] v;
    for (int i = 0; i < 24; i++) v[32*i +: 32] = $urandom;
    return v & 768'((776'd1 << (96 * nf)) - 776'd1);
  endfunction

  task automatic write8(input logic [767:0] v, input logic [7:0] x);
    tb_own = 1'b1;
    for (int f = 0; f < 8; f++) begin
      @(negedge clk); tb_we8 = 1'b1; tb_we128 = 1'b0; tb_addr = 7'(f); tb_wdata = v[96*f +: 96];
    end
    @(negedge clk); tb_we8 = 1'b0; tb_own = 1'b0;
    pm = {x, v};
  endtask


  task automatic write128(input int r, input logic [767:0] v);
    tb_own = 1'b1;
    for (int f = 0; f < 8; f++) begin
      @(negedge clk); tb_we128 = 1'b1; tb_we8 = 1'b0; tb_addr = 7'(r * 8 + f); tb_wdata = v[96*f +: 96];
    end
    @(negedge clk); tb_we128 = 1'b0; tb_own = 1'b0;
    rm[r] = v;
  endtask

  function automatic logic [775:0] read_p();
    logic [775:0] v;
    for (int f = 0; f < 8; f++) v[96*f +: 96] = u_r8.mem[f];
    v[775:768] = ext;
    return v;
  endfunction

  function automatic logic [767:0] read_r(input int r);
    logic [767:0] v;
    for (int f = 0; f < 8; f++) v[96*f +: 96] = u_r128.mem[r * 8 + f];
    return v;
  endfunction

  // run one command, check its cycle count, return the done-cycle flags
  task automatic run(input seq_op_e o, input int r, input logic [7:0] ev, input int nf,
                     output top_res_e tr, output logic neg);
    int cyc;
    @(negedge clk);
    start = 1'b1; op = o; rsel = 4'(r); e = ev; nfields = 4'(nf);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    tr = top_res; neg = cmp_neg;
    checks++;
    if (cyc != ((o == SQ_TOPCMP) ? 1 : nf)) begin
      failures++;
      $display("FAIL op %s took %0d cycles, nfields %0d", o.name(), cyc, nf);
    end
    @(negedge clk);
  endtask

  task automatic check_p(input string what, input int nf);
    logic [767:0] lowmask, got_low, exp_low;
    logic [7:0]   exp_ext;
    lowmask = 768'((776'd1 << (96 * nf)) - 776'd1);
    got_low = 768'(read_p()) & lowmask;
    exp_low = 768'(pm) & lowmask;
    exp_ext = 8'(pm >> (96 * nf));
    checks++;
    if (got_low !== exp_low || ext !== exp_ext) begin
      failures++;
      $display("FAIL %s nf=%0d\n got %h %h\n exp %h %h", what, nf, ext, got_low, exp_ext, exp_low);
    end
  endtask

  initial begin
    top_res_e tr;
    logic     neg;
    logic [775:0] full, t;
    int nf, r, ev;
    start = 0; op = SQ_CLR8; rsel = 0; e = 0; nfields = 8;
    tb_own = 0; tb_we8 = 0; tb_we128 = 0; tb_addr = 0; tb_wdata = 0;
    n_top = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) write128(i, rand768(8));

    for (int it = 0; it < 60; it++) begin
      nf = 1 + ($urandom % 8);
      r  = $urandom % 4;
      ev = $urandom % 256;
      // P := R (known start, extension 0)
      run(SQ_LOAD8, r, 0, nf, tr, neg);
      pm = {8'd0, rm[r] & lm(nf)} & pmask(nf);
      check_p("LOAD8", nf);
      r = $urandom % 4;
      run(SQ_ADD, r, 0, nf, tr, neg);
      pm = (pm + {8'd0, rm[r] & lm(nf)}) & pmask(nf);
      check_p("ADD", nf);
      r = $urandom % 4;
      run(SQ_SUB, r, 0, nf, tr, neg);
      pm = (pm - {8'd0, rm[r] & lm(nf)}) & pmask(nf);
      check_p("SUB", nf);
      r = $urandom % 4;
      run(SQ_MULACC, r, 8'(ev % 64), nf, tr, neg);
      pm = ((pm << 6) + 776'(ev % 64) * {8'd0, rm[r] & lm(nf)}) & pmask(nf);
      check_p("MULACC", nf);
      r = $urandom % 4;
      run(SQ_CMP, r, 8'(ev % 128), nf, tr, neg);
      t = (pm - 776'(ev % 128) * {8'd0, rm[r] & lm(nf)}) & pmask(nf);
      checks++;
      if (neg !== t[96 * nf + 7]) begin failures++; $display("FAIL CMP nf=%0d", nf); end
      run(SQ_REDUCE, r, 8'(ev % 128), nf, tr, neg);
      pm = t;
      check_p("REDUCE", nf);
      // STORE8 into register 5, then NEG register 5
      run(SQ_STORE8, 5, 0, nf, tr, neg);
      rm[5] = (rm[5] & ~768'(pmask(nf) >> 8)) | 768'(pm & (pmask(nf) >> 8));
      checks++;
      if ((read_r(5) & 768'(pmask(nf) >> 8)) !== (rm[5] & 768'(pmask(nf) >> 8))) begin
        failures++; $display("FAIL STORE8 nf=%0d", nf);
      end
      run(SQ_NEG, 5, 0, nf, tr, neg);
      rm[5] = 768'((776'd0 - {8'd0, rm[5]}) & (pmask(nf) >> 8));
      checks++;
      if ((read_r(5) & 768'(pmask(nf) >> 8)) !== rm[5]) begin
        failures++; $display("FAIL NEG nf=%0d", nf);
      end
      run(SQ_CLR8, 0, 0, nf, tr, neg);
      pm = '0;
      check_p("CLR8", nf);
    end

    // top-field compare: P = e*C + delta, with delta near the top field
    for (int it = 0; it < 150; it++) begin
      logic [767:0] c;
      logic [775:0] p, delta;
      int kind;
      nf = 1 + ($urandom % 8);
      c  = rand768(nf) | (768'd1 << (96 * nf - 1));   // top bit of C set
      ev = 1 + ($urandom % 127);
      kind = it % 3;
      delta = (776'(rand768(nf)) >> 96) | (776'($urandom % 100) << (96 * (nf - 1)));
      if (kind == 0) p = 776'(ev) * {8'd0, c} + delta;                              // near: may be unsure
      else if (kind == 1) p = 776'(ev) * {8'd0, c} + (776'(200) << (96 * (nf - 1))) + delta; // accept
      else p = 776'(ev) * {8'd0, c} - (776'(3) << (96 * (nf - 1))) - delta;         // reject
      if (p[775]) p = '0;
      write128(7, c);
      run(SQ_CLR8, 0, 0, nf, tr, neg);             // ext := 0
      write8(768'(p) & 768'((776'd1 << (96 * nf)) - 1), 8'd0);
      // the extension is built by adding 2^(96nf-1) twice per unit
      write128(9, 768'd1 << (96 * nf - 1));
      for (int k = 0; k < 2 * int'(p >> (96 * nf)); k++) run(SQ_ADD, 9, 0, nf, tr, neg);
      pm = p & pmask(nf);
      check_p("setup", nf);
      run(SQ_TOPCMP, 7, 8'(ev), nf, tr, neg);
      n_top[int'(tr)]++;
      full = (776'(ev) * {8'd0, c});
      begin
        logic signed [107:0] v;
        logic [103:0] tp;
        logic [95:0]  tc;
        tp = 104'(pm >> (96 * (nf - 1)));
        tc = 96'(c >> (96 * (nf - 1)));
        v  = $signed({4'd0, tp}) - $signed(108'(ev) * {12'd0, tc});
        checks++;
        if ((v < 0 && tr != TOP_REJECT) || (v >= 128 && tr != TOP_ACCEPT) ||
            (v >= 0 && v < 128 && tr != TOP_UNSURE)) begin
          failures++; $display("FAIL TOPCMP estimate v=%0d res=%s", v, tr.name());
        end
        checks++;
        if ((tr == TOP_ACCEPT && full > pm) || (tr == TOP_REJECT && full <= pm)) begin
          failures++; $display("FAIL TOPCMP inconsistent with exact compare");
        end
      end
    end
    checks++;
    if (n_top[0] == 0 || n_top[1] == 0 || n_top[2] == 0) begin
      failures++;
      $display("FAIL TOPCMP outcomes not all seen: %0d %0d %0d", n_top[0], n_top[1], n_top[2]);
    end
    $display("TOPCMP outcomes reject/accept/unsure: %0d %0d %0d", n_top[0], n_top[1], n_top[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
