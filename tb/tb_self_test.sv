// Self-checking testbench of self_test: feeds random state codes of four
// state machines, models the four 8-bit analysers and the 32-bit analyser
// here (bit-serial polynomial arithmetic), checks that the fold into the
// 32-bit analyser happens every 255 hashed states, that the signature is
// only visible in test mode, and that one changed state changes it.
module tb_self_test;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            en, test_mode;
  logic [3:0][7:0] state;
  logic [31:0]     signature, m32;
  logic [7:0]      count, m8 [4];
  int checks = 0, failures = 0, folds = 0, hashed = 0;

  self_test #(.NFSM(4)) dut (.clk, .rst_n, .en, .state, .test_mode, .signature, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] step8(input logic [7:0] s, input logic [7:0] d);
    logic [8:0] t;
    t = {s, 1'b0};
    if (t[8]) t = t ^ 9'h11D;
    return t[7:0] ^ d;
  endfunction

  function automatic logic [31:0] step32(input logic [31:0] s, input logic [31:0] d);
    logic [32:0] t;
    t = {s, 1'b0};
    if (t[32]) t = t ^ 33'h104C11DB7;
    return t[31:0] ^ d;
  endfunction

  task automatic run(input int n, input int flip_at, output logic [31:0] sig);
    rst_n = 1'b0; en = 0; test_mode = 1;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    m32 = 0; for (int k = 0; k < 4; k++) m8[k] = 0;
    hashed = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      en = (i % 7 != 3);
      for (int k = 0; k < 4; k++) state[k] = 8'((i * (k + 3)) ^ (i >> 2) ^ ((i == flip_at && k == 2) ? 1 : 0));
      @(posedge clk);
      if (en) begin
        if (hashed == 255) begin
          m32 = step32(m32, {m8[3], m8[2], m8[1], m8[0]});
          for (int k = 0; k < 4; k++) m8[k] = state[k];
          hashed = 1;
          folds++;
        end else begin
          for (int k = 0; k < 4; k++) m8[k] = step8(m8[k], state[k]);
          hashed++;
        end
      end
      #1;
      checks++;
      if (signature !== m32 || count !== 8'(hashed) || dut.sa !== {m8[3], m8[2], m8[1], m8[0]}) begin
        failures++;
        $display("FAIL at %0d: sig %h/%h count %0d/%0d", i, signature, m32, count, hashed);
      end
    end
    @(negedge clk); en = 0;
    sig = signature;
  endtask

  initial begin
    logic [31:0] s1, s2;
    en = 0; test_mode = 0; state = '0;
    run(1200, -1, s1);
    run(1200, 100, s2);
    checks++;
    if (folds < 6) begin failures++; $display("FAIL only %0d folds", folds); end
    checks++;
    if (s1 == s2 || s1 == 0) begin failures++; $display("FAIL signature insensitive"); end
    test_mode = 0; #1;
    checks++;
    if (signature !== 32'd0) begin failures++; $display("FAIL signature visible outside test mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
