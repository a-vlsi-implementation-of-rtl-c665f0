// sig_analyser8: 8-bit parallel-input signature analyser (MISR).
//
// Each enabled cycle the register shifts left by one, folds the bit that
// falls out back in through the feedback polynomial, and XORs in the 8-bit
// input word:  sig' = (sig << 1) ^ (sig[7] ? POLY : 0) ^ din.
// With clear the old contents are dropped: sig' = din.
// One such analyser hashes the state code of one state machine, one state per enabled cycle.
// The 8-bit width follows the document; the feedback polynomial,
// x^8 + x^4 + x^3 + x^2 + 1,
// and the clear behaviour are this design's own choices.
// Synchronous active-low reset to zero.
module sig_analyser8 #(
  parameter logic [7:0] POLY = 8'h1D
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        clear,
  input  logic [7:0] din,
  output logic [7:0] sig
);
  always_ff @(posedge clk) begin
    if (!rst_n)     sig <= '0;
    else if (en) begin
      if (clear)    sig <= din;
      else          sig <= {sig[6:0], 1'b0} ^ (sig[7] ? POLY : '0) ^ din;
    end
  end
endmodule
