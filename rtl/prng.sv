// prng: the built-in pseudo-random generator (for testing only).
//
// A 96-bit Fibonacci LFSR with the feedback taps 96, 94, 49, 47
// (x^96 + x^94 + x^49 + x^47 + 1, maximal length). Each next pulse advances
// it by 96 steps at once, so consecutive words share no bits; the word is
// the register contents. load replaces the state with seed (an all-zero
// seed is replaced by the reset value, since zero is a fixed point).
// The document only says a PRNG for test purposes is built in and that a
// real application must use an external random source; its width, type
// and polynomial here are this design's own choices. Synchronous
// active-low reset to RESET_VALUE.
module prng #(
  parameter logic [95:0] RESET_VALUE = 96'h0123_4567_89AB_CDEF_FEDC_BA98
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next,
  input  logic        load,
  input  logic [95:0] seed,
  output logic [95:0] word
);
  logic [95:0] adv;

  always_comb begin
    adv = word;
    for (int i = 0; i < 96; i++)
      adv = {adv[94:0], adv[95] ^ adv[93] ^ adv[48] ^ adv[46]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     word <= RESET_VALUE;
    else if (load)  word <= (seed == '0) ? RESET_VALUE : seed;
    else if (next)  word <= adv;
  end
endmodule
