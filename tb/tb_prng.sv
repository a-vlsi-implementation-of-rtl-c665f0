// Self-checking testbench of prng: every word must equal the LFSR advanced
// 96 single steps (computed here with the taps 96, 94, 49, 47), load must
// set the seed, an all-zero seed must be refused, and the words between two loads must
// all differ and be balanced in ones and zeros.
module tb_prng;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        next, load;
  logic [95:0] seed, word, model;
  logic [95:0] seen [$];
  int checks = 0, failures = 0;
  longint ones = 0;
  int nwords = 0;

  prng dut (.clk, .rst_n, .next, .load, .seed, .word);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [95:0] adv(input logic [95:0] s);
    for (int i = 0; i < 96; i++) begin
      logic fb;
      fb = s[95] ^ s[93] ^ s[48] ^ s[46];
      s = (s << 1) | 96'(fb);
    end
    return s;
  endfunction

  initial begin
    next = 0; load = 0; seed = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = 96'h0123_4567_89AB_CDEF_FEDC_BA98;
    #1 checks++;
    if (word !== model) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      next = ($urandom % 3 != 0);
      load = (i == 500) || (i == 900);
      seed = (i == 900) ? 96'd0 : {$urandom, $urandom, $urandom};
      @(posedge clk);
      if (load) begin
        model = (seed == 0) ? 96'h0123_4567_89AB_CDEF_FEDC_BA98 : seed;
        seen.delete();   // a new seed restarts the sequence
      end
      else if (next) model = adv(model);
      #1;
      checks++;
      if (word !== model) begin failures++; $display("FAIL word %h exp %h", word, model); end
      if (next && !load) begin
        foreach (seen[k]) if (seen[k] == word) begin
          failures++; $display("FAIL repeated word %h", word);
        end
        seen.push_back(word);
        ones += $countones(word);
        nwords++;
      end
    end
    checks++;
    if (ones < longint'(nwords) * 44 || ones > longint'(nwords) * 52) begin
      failures++; $display("FAIL unbalanced: %0d ones in %0d words", ones, nwords);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
