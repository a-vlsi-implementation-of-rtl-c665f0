// Self-checking testbench of alu24: random operands, result compared with
// {cout, out} = (negx ? ~x : x) * e + y + z + cin computed in 64-bit
// integer arithmetic, plus the corner case of all operands at maximum.
module tb_alu24;
  logic        clk = 1'b0;
  logic [23:0] x, y, z, out;
  logic        negx;
  logic [7:0]  e, cin;
  logic [8:0]  cout;
  int checks = 0, failures = 0;

  alu24 dut (.x, .negx, .e, .y, .z, .cin, .out, .cout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint unsigned xs, expv;
    #1;
    xs   = negx ? (64'hFFFFFF - 64'(x)) : 64'(x);
    expv = xs * 64'(e) + 64'(y) + 64'(z) + 64'(cin);
    checks++;
    if ({cout, out} !== expv[32:0]) begin
      failures++;
      $display("FAIL x=%h negx=%b e=%h y=%h z=%h cin=%h got %h exp %h",
               x, negx, e, y, z, cin, {cout, out}, expv[32:0]);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x = 24'($urandom); y = 24'($urandom); e = 8'($urandom); cin = 8'($urandom);
      negx = 1'($urandom);
      z = (i % 2 == 0) ? 24'd0 : 24'($urandom);
      check_one();
    end
    x = '1; y = '1; z = '1; e = '1; cin = '1; negx = 1'b0; check_one();
    x = '0; negx = 1'b1; check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
