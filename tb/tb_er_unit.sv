// Self-checking testbench of er_unit: loads each 24-bit part of random
// words, checks the 6- and 8-bit digit multiplexer, the 6-bit left shift
// and the 1-bit right shift against a model of the register.
module tb_er_unit;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load, shift6, shr1, digit_w8;
  logic [1:0]  l_sel, j_sel;
  logic [95:0] word;
  logic [23:0] er, model;
  logic [7:0]  digit, expd;
  logic [5:0]  top6;
  int checks = 0, failures = 0;

  er_unit dut (.clk, .rst_n, .load, .l_sel, .word, .shift6, .shr1, .digit_w8,
               .j_sel, .er, .digit, .top6);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shift6 = 0; shr1 = 0; digit_w8 = 0; l_sel = 0; j_sel = 0; word = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      load   = ($urandom % 3 == 0);
      shift6 = 1'($urandom);
      shr1   = 1'($urandom);
      l_sel  = 2'($urandom);
      word   = {$urandom, $urandom, $urandom};
      digit_w8 = 1'($urandom);
      j_sel  = 2'($urandom);
      #1;
      // combinational outputs of the current contents
      if (digit_w8) expd = (j_sel == 3) ? 8'd0 : 8'((model >> (8 * j_sel)) & 24'hFF);
      else          expd = 8'((model >> (6 * j_sel)) & 24'h3F);
      checks++;
      if (digit !== expd || top6 !== model[23:18] || er !== model) begin
        failures++;
        $display("FAIL digit %h/%h er %h/%h", digit, expd, er, model);
      end
      @(posedge clk);
      if (load)        model = 24'((word >> (24 * l_sel)) & 96'hFFFFFF);
      else if (shift6) model = model << 6;
      else if (shr1)   model = model >> 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
