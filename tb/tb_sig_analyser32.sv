// Self-checking testbench of sig_analyser32. The expected signature is
// computed here bit-serially as polynomial arithmetic over GF(2): the state
// times x, reduced by the feedback polynomial one bit at a time, plus the
// input word. Checks random input streams with enable and clear, and that
// a single changed input word changes the final signature.
module tb_sig_analyser32;
  logic             clk = 1'b0, rst_n = 1'b0;
  logic             en, clear;
  logic [31:0] din, sig, model;
  int checks = 0, failures = 0;

  sig_analyser32 dut (.clk, .rst_n, .en, .clear, .din, .sig);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // multiply by x modulo the polynomial x^32 + POLY, then add din
  function automatic logic [31:0] step(input logic [31:0] s, input logic [31:0] d);
    logic [32:0] t;
    t = {s, 1'b0};
    if (t[32]) t = t ^ {1'b1, 32'h04C11DB7};
    return t[31:0] ^ d;
  endfunction

  initial begin
    logic [31:0] sig_a, sig_b;
    en = 0; clear = 0; din = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom % 4 != 0);
      clear = ($urandom % 50 == 0);
      din = 32'($urandom);
      @(posedge clk);
      if (en) model = clear ? din : step(model, din);
      #1;
      checks++;
      if (sig !== model) begin
        failures++;
        $display("FAIL sig %h exp %h", sig, model);
      end
    end
    // a changed input word must show in the signature
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); en = 1; clear = 1; din = '0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk); clear = 0; din = 32'(i * 7 + 3) ^ ((run == 1 && i == 17) ? 32'(1) : 32'(0));
      end
      @(negedge clk); en = 0;
      if (run == 0) sig_a = sig; else sig_b = sig;
    end
    checks++;
    if (sig_a == sig_b) begin failures++; $display("FAIL signature did not change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
