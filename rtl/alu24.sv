// alu24: one 24-bit slice of the engine's ALU.
//
// Computes {cout, out} = (negx ? ~x : x) * e + y + z + cin in one cycle.
// The 24x8 product and the three addends are summed as one carry-save tree,
// so a slice can multiply 8 bits of one operand by 16 or 24 bits of another
// and at the same time add partial results or a correction constant.
// Four slices make the 96-bit ALU: chained through cin/cout they form the
// 96x8 multiplier / adder / negator of long-number mode; in IDEA mode two
// slices form a 16x16 multiplier, or each slice computes one low-high
// reduction candidate. The 24-bit width and the use in both modes follow the
// document; the exact operand set (x, e, y, z, cin) is this design's choice.
// Purely combinational. cout is 9 bits; in chained mode (z = 0) its top bit
// is always zero.
module alu24 (
  input  logic [23:0] x,
  input  logic        negx,
  input  logic [7:0]  e,
  input  logic [23:0] y,
  input  logic [23:0] z,
  input  logic [7:0]  cin,
  output logic [23:0] out,
  output logic [8:0]  cout
);
  logic [23:0] xs;
  logic [32:0] sum;

  always_comb begin
    xs  = negx ? ~x : x;
    sum = 33'(xs) * 33'(e) + 33'(y) + 33'(z) + 33'(cin);
    out  = sum[23:0];
    cout = sum[32:24];
  end
endmodule
