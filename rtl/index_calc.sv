// index_calc: the INDEX_CALC unit, four 8-bit index registers.
//
// An index register addresses a 6-bit digit inside a 768-bit data register
// (Fig. 4): bits 6..4 pick the 96-bit field k, bits 3..2 the 24-bit part l
// of that field, bits 1..0 the 6-bit (or 8-bit) digit j of that part.
// Bit 7 is used as the sign / underflow flag: counting an index down past
// zero sets it, which is how loops over the parts of a register end.
// One command per cycle: dst := dst OP src (or dst := src for IX_LOAD),
// where src is an immediate, another index register or the low 8 bits of ER.
// The register count, width and layout follow the document; the command set
// and the use of bit 7 are this design's own choice.
// Outputs are the registered index values; synchronous active-low reset.
module index_calc
  import rsaidea_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ix_op_e          op,
  input  logic [1:0]      dst,
  input  ix_src_e         src_sel,
  input  logic [1:0]      src_reg,
  input  logic [7:0]      imm,
  input  logic [7:0]      er_low,
  output logic [3:0][7:0] idx
);
  logic [7:0] src, res;

  always_comb begin
    unique case (src_sel)
      IXS_REG: src = idx[src_reg];
      IXS_ER:  src = er_low;
      default: src = imm;
    endcase
    unique case (op)
      IX_LOAD: res = src;
      IX_ADD:  res = idx[dst] + src;
      IX_AND:  res = idx[dst] & src;
      IX_OR:   res = idx[dst] | src;
      IX_XOR:  res = idx[dst] ^ src;
      default: res = idx[dst];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)             idx <= '0;
    else if (op != IX_NOP)  idx[dst] <= res;
  end
endmodule
