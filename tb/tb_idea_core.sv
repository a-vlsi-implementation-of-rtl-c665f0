// Self-checking testbench of idea_core with the ALU and a subkey memory.
// Checks the published IDEA test vector (key 0001 0002 ... 0008, plaintext
// 0000 0001 0002 0003, ciphertext 11FB ED2B 0198 6DE5), then random keys
// and blocks against the reference model, decryption with the inverse key
// set stored at another base address, blocks with zero words (the 2^16
// case of the multiplication) and the 50-cycle transform time.
module tb_idea_core
  import rsaidea_pkg::*;
  import idea_ref_pkg::*;
;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start, busy, done;
  logic [6:0]  key_base, key_addr;
  logic [63:0] din, dout;
  logic [95:0] kram [128];
  alu_req_t    alu_req;
  alu_rsp_t    alu_rsp;
  logic [7:0]  state_code;
  int checks = 0, failures = 0;

  idea_core dut (.clk, .rst_n, .start, .key_base, .din, .dout, .busy, .done,
                 .key_addr, .key_word(kram[key_addr]), .alu_req, .alu_rsp, .state_code);
  alu u_alu (.req(alu_req), .rsp(alu_rsp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_keys(input key52_t z, input int base);
    for (int w = 0; w < 9; w++) kram[base + w] = key_word(z, w);
  endtask

  task automatic transform(input logic [63:0] blk, input int base, output logic [63:0] res);
    int cyc;
    @(negedge clk);
    start = 1'b1; din = blk; key_base = 7'(base);
    @(negedge clk);
    start = 1'b0; din = '0;
    cyc = 0;
    while (busy && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 50 || !done) begin
      failures++;
      $display("FAIL transform took %0d cycles (done=%b)", cyc, done);
    end
    res = dout;
  endtask

  task automatic expect64(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    key52_t ek, dk;
    logic [63:0] ct, pt, blk;
    logic [127:0] key;
    start = 0; din = '0; key_base = '0;
    for (int i = 0; i < 128; i++) kram[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // published test vector
    key = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    ek  = enc_keys(key);
    dk  = dec_keys(ek);
    expect64("reference model", cipher(64'h0000_0001_0002_0003, ek), 64'h11FB_ED2B_0198_6DE5);
    load_keys(ek, 0);
    load_keys(dk, 16);
    transform(64'h0000_0001_0002_0003, 0, ct);
    expect64("test vector", ct, 64'h11FB_ED2B_0198_6DE5);
    transform(ct, 16, pt);
    expect64("test vector decrypt", pt, 64'h0000_0001_0002_0003);

    for (int i = 0; i < 40; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      if (i % 5 == 1) key[127:64] = '0;   // zero subkeys
      ek = enc_keys(key);
      dk = dec_keys(ek);
      load_keys(ek, 32);
      load_keys(dk, 100);
      blk = {$urandom, $urandom};
      if (i % 4 == 2) blk[47:16] = '0;    // zero data words
      transform(blk, 32, ct);
      expect64("encrypt", ct, cipher(blk, ek));
      transform(ct, 100, pt);
      expect64("decrypt", pt, blk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
