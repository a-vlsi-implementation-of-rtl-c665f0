// Self-checking testbench of high_level_commands. The three sequencers are
// stood in for by counters that answer done after a random delay. For
// every command code (all 32) it checks which strobe fires in the
// accepting cycle (exactly the one belonging to the code, none for unused
// codes), that cmd_ready stays low and no second command is taken while
// busy, and that cmd_done comes one cycle after the command finished.
module tb_high_level_commands
  import rsaidea_pkg::*;
;
  logic    clk = 1'b0, rst_n = 1'b0;
  logic    cmd_valid, cmd_ready, cmd_done;
  hl_cmd_e cmd;
  logic    host_wr128, host_rd128, host_wr8, host_rd8, host_rand, host_sig;
  logic    host_ix, host_er, host_stat;
  logic    seq_go, seq_done, mm_go, mm_done, idea_go, idea_done;
  logic [7:0] state_code;
  int checks = 0, failures = 0;
  int delay;

  high_level_commands dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .cmd_done,
    .host_wr128, .host_rd128, .host_wr8, .host_rd8, .host_rand, .host_sig,
    .host_ix, .host_er, .host_stat,
    .seq_go, .seq_done, .mm_go, .mm_done, .idea_go, .idea_done, .state_code);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  initial begin
    logic [11:0] strobes, want;
    int c, cyc, engine;
    cmd_valid = 0; cmd = HC_NOP; seq_done = 0; mm_done = 0; idea_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 6; rep++) begin
      for (c = 0; c < 32; c++) begin
        @(negedge clk);
        expect_bit("ready when idle", cmd_ready, 1'b1);
        cmd = hl_cmd_e'(c); cmd_valid = 1'b1;
        #1;
        strobes = {host_wr128, host_rd128, host_wr8, host_rd8, host_rand, host_sig,
                   seq_go, mm_go, idea_go, host_ix, host_er, host_stat};
        case (c)
          1: want = 12'b100000000000;  2: want = 12'b010000000000;
          3: want = 12'b001000000000;  4: want = 12'b000100000000;
          8: want = 12'b000010000000;  9: want = 12'b000001000000;
          5: want = 12'b000000100000;  6: want = 12'b000000010000;
          7: want = 12'b000000001000;  10: want = 12'b000000000100;
          11: want = 12'b000000000010; 12: want = 12'b000000000001;
          default: want = 12'b0;
        endcase
        checks++;
        if (strobes !== want) begin
          failures++; $display("FAIL cmd %0d strobes %b exp %b", c, strobes, want);
        end
        engine = (c == 5) ? 1 : (c == 6) ? 2 : (c == 7) ? 3 : 0;
        @(negedge clk);
        // keep cmd_valid high: a busy decoder must not take it again
        delay = (engine != 0) ? 1 + ($urandom % 20) : 0;
        for (int k = 0; k < delay; k++) begin
          #1;
          expect_bit("not ready while busy", cmd_ready, 1'b0);
          expect_bit("no strobe while busy", |{host_wr128, host_rd128, host_wr8, host_rd8,
                                               host_rand, host_sig, seq_go, mm_go, idea_go,
                                               host_ix, host_er, host_stat}, 1'b0);
          expect_bit("no early done", cmd_done, 1'b0);
          if (k == delay - 1) begin
            seq_done = (engine == 1); mm_done = (engine == 2); idea_done = (engine == 3);
          end
          @(negedge clk);
          seq_done = 0; mm_done = 0; idea_done = 0;
        end
        cmd_valid = 1'b0;
        #1;
        expect_bit("done one cycle after finish", cmd_done, 1'b1);
        @(negedge clk);
        expect_bit("done is a pulse", cmd_done, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
