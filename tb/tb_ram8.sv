// Self-checking testbench of ram8: random writes and reads compared with a
// shadow copy; also checks that a read in the cycle of a write to the same
// address returns the old word (write takes effect at the clock edge).
module tb_ram8;
  logic          clk = 1'b0;
  logic          we;
  logic [2:0]  waddr, raddr;
  logic [95:0]   wdata, rdata;
  logic [95:0]   shadow [8];
  logic          valid [8];
  int checks = 0, failures = 0;

  ram8 dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) valid[i] = 1'b0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    // fill every word once
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(i); wdata = {$urandom, $urandom, $urandom};
      raddr = 3'(i);
      shadow[i] = wdata; valid[i] = 1'b1;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 3'($urandom);
      wdata = {$urandom, $urandom, $urandom};
      raddr = (i % 3 == 0) ? waddr : 3'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++;
        $display("FAIL read %0d got %h exp %h", raddr, rdata, shadow[raddr]);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
