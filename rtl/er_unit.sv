// er_unit: the 24-bit register ER with its two multiplexers (Fig. 3).
//
// ER is loaded with one 24-bit part of a 96-bit RAM word (part l_sel, as
// selected by bits 3..2 of an index register) and supplies the 6- or 8-bit
// multiplier digit to the ALU. Digit j_sel (bits 1..0 of an index register)
// is ER[6j+5:6j] in 6-bit mode or ER[8j+7:8j] in 8-bit mode (j = 3 gives 0
// in 8-bit mode). top6 is ER[23:18], the digit the modular multiply uses;
// shift6 shifts ER left by 6 so the next digit moves to the top, and shr1
// shifts it right by one bit (the document mentions right shifts for
// division and bit operations).
// Priority when several controls are active: load, shift6, shr1.
// Sizes and the two multiplexers follow the document; the control encoding
// and the priority are this design's own choice. Synchronous, active-low
// reset clears ER.
module er_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [1:0]  l_sel,
  input  logic [95:0] word,
  input  logic        shift6,
  input  logic        shr1,
  input  logic        digit_w8,
  input  logic [1:0]  j_sel,
  output logic [23:0] er,
  output logic [7:0]  digit,
  output logic [5:0]  top6
);
  always_ff @(posedge clk) begin
    if (!rst_n)      er <= '0;
    else if (load)   er <= word[24*l_sel +: 24];
    else if (shift6) er <= {er[17:0], 6'd0};
    else if (shr1)   er <= {1'b0, er[23:1]};
  end

  always_comb begin
    if (digit_w8) digit = (j_sel == 2'd3) ? 8'd0 : er[8*j_sel +: 8];
    else          digit = {2'd0, er[6*j_sel +: 6]};
  end

  assign top6 = er[23:18];
endmodule
