// Self-checking testbench of index_calc: random commands with immediate,
// register and ER sources against a model of the four index registers;
// also a count-down loop over 24-bit parts that must end with bit 7 set.
module tb_index_calc;
  import rsaidea_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  ix_op_e          op;
  logic [1:0]      dst, src_reg;
  ix_src_e         src_sel;
  logic [7:0]      imm, er_low, src;
  logic [3:0][7:0] idx;
  logic [7:0]      model [4];
  int checks = 0, failures = 0;

  index_calc dut (.clk, .rst_n, .op, .dst, .src_sel, .src_reg, .imm, .er_low, .idx);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (idx[r] !== model[r]) begin
        failures++;
        $display("FAIL idx[%0d] got %h exp %h", r, idx[r], model[r]);
      end
    end
  endtask

  initial begin
    int n;
    op = IX_NOP; dst = 0; src_reg = 0; src_sel = IXS_IMM; imm = 0; er_low = 0;
    for (int r = 0; r < 4; r++) model[r] = 8'd0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op      = ix_op_e'($urandom % 6);
      dst     = 2'($urandom);
      src_reg = 2'($urandom);
      src_sel = ix_src_e'($urandom % 3);
      imm     = 8'($urandom);
      er_low  = 8'($urandom);
      src = (src_sel == IXS_REG) ? model[src_reg] : (src_sel == IXS_ER) ? er_low : imm;
      @(posedge clk);
      case (op)
        IX_LOAD: model[dst] = src;
        IX_ADD:  model[dst] = model[dst] + src;
        IX_AND:  model[dst] = model[dst] & src;
        IX_OR:   model[dst] = model[dst] | src;
        IX_XOR:  model[dst] = model[dst] ^ src;
        default: ;
      endcase
      #1 compare();
    end
    // count register 2 down from part 5 (field 1, part 1) in steps of one part
    @(negedge clk); op = IX_LOAD; dst = 2; src_sel = IXS_IMM; imm = 8'd5 << 2;
    @(negedge clk); op = IX_ADD; imm = 8'hFC;
    n = 0;
    while (!idx[2][7] && n < 100) begin
      checks++;
      if (idx[2][6:4] !== 3'((5 - n) / 4) || idx[2][3:2] !== 2'((5 - n) % 4)) begin
        failures++;
        $display("FAIL countdown step %0d idx %h", n, idx[2]);
      end
      @(negedge clk);
      n++;
    end
    op = IX_NOP;
    checks++;
    if (n != 6) begin failures++; $display("FAIL countdown length %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
