// Self-checking testbench of modmul_ctrl, run inside the full engine
// through its command interface. Random A, B, C of 1..3 fields
// (96..288 bits) and of full 768-bit length are multiplied modulo C; the
// result in RAM8 is compared with (A*B) mod C computed here in wide
// integer arithmetic (including A = 0, A = 1 with B = C-1 and A all ones
// with B = C-1), and the cycle count with
//   nfields + 1 + len_chunks * (4 * (2*nfields + 7) + 1) + nfields * fullcmps.
// Moduli whose top field is tiny make the top-field estimate inconclusive,
// so the full-compare path is exercised and counted too.
module tb_modmul_ctrl
  import rsaidea_pkg::*;
;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmd_valid, cmd_ready, cmd_done, test_mode;
  logic [4:0]  cmd;
  logic [6:0]  addr;
  logic [95:0] wdata, rdata;
  logic [3:0]  reg_a, reg_b, reg_c, nfields, seq_op;
  logic [5:0]  len_chunks;
  logic [7:0]  seq_e, ext;
  int checks = 0, failures = 0, fullcmps = 0, n_full_runs = 0;

  rsa_idea_top dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .cmd_done, .addr, .wdata,
                    .rdata, .reg_a, .reg_b, .reg_c, .len_chunks, .nfields, .seq_op, .seq_e,
                    .test_mode, .ext);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.u_mm.full_cmp) fullcmps++;

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

  task automatic read_p(output logic [767:0] v);
    int cyc;
    for (int f = 0; f < 8; f++) begin
      addr = 7'(f);
      command(HC_RD8, cyc);
      v[96*f +: 96] = rdata;
    end
  endtask

  function automatic logic [767:0] rnd(input int bits);
    logic [767:0] v;
    for (int i = 0; i < 24; i++) v[32*i +: 32] = $urandom;
    return (bits >= 768) ? v : (v & ((768'd1 << bits) - 768'd1));
  endfunction

  task automatic one(input int nf, input int len, input logic [767:0] a,
                     input logic [767:0] b, input logic [767:0] c);
    logic [1535:0] expv;
    logic [767:0]  got;
    int cyc, fc0, want;
    write_reg(1, a); write_reg(2, b); write_reg(3, c);
    reg_a = 4'd1; reg_b = 4'd2; reg_c = 4'd3; nfields = 4'(nf); len_chunks = 6'(len);
    fc0 = fullcmps;
    command(HC_MODMUL, cyc);
    read_p(got);
    expv = ({768'd0, a} * {768'd0, b}) % {768'd0, c};
    checks++;
    // fields above nfields are not part of the register
    got = got & ((768'd1 << (96 * nf)) - 768'd1);
    if (got !== expv[767:0]) begin
      failures++;
      $display("FAIL modmul nf=%0d len=%0d\n a=%h\n b=%h\n c=%h\n got=%h\n exp=%h",
               nf, len, a, b, c, got, expv[767:0]);
    end
    // cycles counted from the accepting edge to cmd_done: the multiply's
    // start-to-done time plus the command decoder's done state
    want = nf + 1 + len * (4 * (2 * nf + 7) + 1) + nf * (fullcmps - fc0) + 1;
    checks++;
    if (cyc != want) begin
      failures++;
      $display("FAIL modmul cycles %0d expected %0d", cyc, want);
    end
    if (fullcmps != fc0) n_full_runs++;
  endtask

  initial begin
    logic [767:0] a, b, c;
    int nf, len;
    cmd_valid = 0; cmd = 0; addr = 0; wdata = 0; reg_a = 0; reg_b = 0; reg_c = 0;
    nfields = 8; seq_op = 0; seq_e = 0; len_chunks = 1; test_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 24; i++) begin
      nf  = 1 + (i % 3);
      len = 4 * nf;
      c   = rnd(96 * nf) | (768'd1 << (96 * nf - 1 - (i % 5)));
      if (i % 4 == 3) c = (768'd1 << (96 * (nf - 1))) | rnd(96 * (nf - 1)); // tiny top field
      if (nf == 1 && i % 4 == 3) c = rnd(20) | 768'd3;
      b   = rnd(96 * nf) % c;
      a   = rnd(24 * len);
      if (i == 0) a = '0;
      if (i == 1) begin a = 768'd1; b = c - 768'd1; end
      if (i == 2) begin a = (768'd1 << (24 * len)) - 1; b = c - 768'd1; end
      one(nf, len, a, b, c);
    end
    // one full-length 768-bit operation
    c = rnd(768) | (768'd1 << 767);
    b = rnd(768) % c;
    a = rnd(768);
    one(8, 32, a, b, c);
    checks++;
    if (n_full_runs == 0) begin failures++; $display("FAIL no full compare happened"); end
    $display("modular multiplies with full compares: %0d (full compares %0d)", n_full_runs, fullcmps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
