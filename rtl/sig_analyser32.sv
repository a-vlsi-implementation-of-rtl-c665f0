// sig_analyser32: 32-bit parallel-input signature analyser (MISR).
//
// Each enabled cycle the register shifts left by one, folds the bit that
// falls out back in through the feedback polynomial, and XORs in the 32-bit
// input word:  sig' = (sig << 1) ^ (sig[31] ? POLY : 0) ^ din.
// With clear the old contents are dropped: sig' = din.
// It collects the 8-bit analysers of all state machines, 32 bits at a time, and is the signature read out in test mode.
// The 32-bit width follows the document; the feedback polynomial,
// x^32 + x^26 + x^23 + x^22 + x^16 + x^12 + x^11 + x^10 + x^8 + x^7 + x^5 + x^4 + x^2 + x + 1 (the CRC-32 polynomial),
// and the clear behaviour are this design's own choices.
// Synchronous active-low reset to zero.
module sig_analyser32 #(
  parameter logic [31:0] POLY = 32'h04C11DB7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        clear,
  input  logic [31:0] din,
  output logic [31:0] sig
);
  always_ff @(posedge clk) begin
    if (!rst_n)     sig <= '0;
    else if (en) begin
      if (clear)    sig <= din;
      else          sig <= {sig[30:0], 1'b0} ^ (sig[31] ? POLY : '0) ^ din;
    end
  end
endmodule
