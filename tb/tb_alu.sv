// Self-checking testbench of the 96-bit ALU in its three configurations:
//  modular mode against (negx ? ~x : x) * e + y + cin in 104-bit arithmetic,
//  IDEA multiply against the two 16x16 products,
//  IDEA reduce against lo - hi (+F4) (+add2) in integer arithmetic.
// It also checks that the low-high reduction gives a*b mod 65537.
module tb_alu;
  import rsaidea_pkg::*;
  logic     clk = 1'b0;
  alu_req_t req;
  alu_rsp_t rsp;
  int checks = 0, failures = 0;

  alu dut (.req, .rsp);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [95:0] rand96();
    return {$urandom, $urandom, $urandom};
  endfunction

  task automatic expect_eq(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [103:0] expv, xs;
    logic [31:0]  p;
    int           lo, hi, r;
    // modular mode
    for (int i = 0; i < 3000; i++) begin
      req      = '0;
      req.mode = ALU_MOD;
      req.x    = rand96();
      req.y    = rand96();
      req.e    = 8'($urandom);
      req.cin  = 8'($urandom);
      req.negx = 1'($urandom);
      if (i == 0) begin req.x = '1; req.y = '1; req.e = '1; req.cin = '1; req.negx = 1'b0; end
      #1;
      xs   = req.negx ? {8'd0, ~req.x} : {8'd0, req.x};
      expv = xs * {96'd0, req.e} + {8'd0, req.y} + {96'd0, req.cin};
      expect_eq("mod", {24'd0, rsp.cout, rsp.out}, {24'd0, expv});
    end
    // IDEA multiply
    for (int i = 0; i < 2000; i++) begin
      req      = '0;
      req.mode = ALU_IDEA_MUL;
      req.ma = 16'($urandom); req.mb = 16'($urandom);
      req.mc = 16'($urandom); req.md = 16'($urandom);
      if (i == 0) begin req.ma = '1; req.mb = '1; end
      #1;
      expect_eq("mul1", {96'd0, rsp.out[71:48], rsp.out[7:0]}, 128'(32'(req.ma) * 32'(req.mb)));
      expect_eq("mul2", {96'd0, rsp.out[95:72], rsp.out[31:24]}, 128'(32'(req.md) * 32'(req.mc)));
    end
    // IDEA reduce: candidates, and the selected result is a*b mod 65537
    for (int i = 0; i < 2000; i++) begin
      int a, b, add, want, sel;
      a = 1 + ($urandom % 65535); b = 1 + ($urandom % 65535);
      add = $urandom % 65536;
      p = 32'(a) * 32'(b);
      req      = '0;
      req.mode = ALU_IDEA_RED;
      req.lo1  = p[15:0]; req.hi1 = {1'b0, p[31:16]};
      req.lo2  = p[15:0]; req.hi2 = {1'b0, p[31:16]};
      req.add2 = 16'(add);
      #1;
      lo = int'(p[15:0]); hi = int'(p[31:16]);
      r = lo - hi;
      expect_eq("r1", 128'(rsp.out[23:0]), {104'd0, 24'(r)});
      expect_eq("r3", 128'(rsp.out[71:48]), {104'd0, 24'(r + 65537)});
      expect_eq("r2", 128'(rsp.out[47:24]), {104'd0, 24'(r + add)});
      expect_eq("r4", 128'(rsp.out[95:72]), {104'd0, 24'(r + add + 65537)});
      want = int'((longint'(a) * longint'(b)) % 65537);
      sel  = rsp.out[23] ? int'(rsp.out[63:48]) : int'(rsp.out[15:0]);
      expect_eq("lowhigh", 128'(sel), 128'(want % 65536));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
