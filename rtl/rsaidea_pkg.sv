// Shared constants and types of the RSA/IDEA encryption engine.
//
// Long numbers live in 768-bit data registers, stored as eight 96-bit
// fields (least significant field first) in two RAMs: RAM8 (one register,
// used as the accumulator of long operations) and RAM128 (sixteen registers,
// also holding the IDEA subkeys). A single 96-bit ALU built from four 24-bit
// slices serves both the long-number arithmetic and IDEA.
// The field, register and slice sizes follow the document; the encodings of
// the enums and the struct layout are this design's own choices.
// Linting this package on its own reports its constants as unused; they
// are used by the modules that import it.
package rsaidea_pkg;

  localparam int RAM8_DEPTH   = 8;    // one data register
  localparam int RAM128_DEPTH = 128;  // sixteen data registers

  // 2^16 + 1, the IDEA multiplication modulus (Fermat number F4)
  localparam logic [23:0] F4 = 24'h010001;

  // ALU configuration
  typedef enum logic [1:0] {
    ALU_MOD      = 2'd0,  // 96x8 multiply-add / adder / negator with carry
    ALU_IDEA_MUL = 2'd1,  // two 16x16 multipliers
    ALU_IDEA_RED = 2'd2   // four low-high reduction candidates
  } alu_mode_e;

  // Request bundle from a sequencer to the shared ALU.
  typedef struct packed {
    alu_mode_e   mode;
    // modular mode: {cout,out} = (negx ? ~x : x) * e + y + cin
    logic [95:0] x;
    logic        negx;
    logic [7:0]  e;
    logic [95:0] y;
    logic [7:0]  cin;
    // IDEA multiply mode: products ma*mb (alu24.1/.3) and md*mc (alu24.2/.4)
    logic [15:0] ma, mb, mc, md;
    // IDEA reduce mode: lo - hi (+F4) on alu24.1/.3, lo2 - hi2 + add2 (+F4)
    // on alu24.2/.4
    logic [15:0] lo1, lo2;
    logic [16:0] hi1, hi2;
    logic [15:0] add2;
  } alu_req_t;

  // ALU result: the four slice outputs {alu24.4, alu24.3, alu24.2, alu24.1}
  // and, in modular mode, the 8-bit carry out of the top slice.
  typedef struct packed {
    logic [95:0] out;
    logic [7:0]  cout;
  } alu_rsp_t;

  // Arithmetic commands of the ALU sequencer (operate on whole registers).
  // P is RAM8 with its 8-bit extension, R is RAM128 register 'reg'.
  typedef enum logic [3:0] {
    SQ_CLR8   = 4'd0,  // P := 0
    SQ_LOAD8  = 4'd1,  // P := R
    SQ_STORE8 = 4'd2,  // R := P (low 768 bits)
    SQ_ADD    = 4'd3,  // P := P + R
    SQ_SUB    = 4'd4,  // P := P - R
    SQ_NEG    = 4'd5,  // R := -R (two's complement, 768 bits)
    SQ_MULACC = 4'd6,  // P := P * 64 + e * R
    SQ_REDUCE = 4'd7,  // P := P - e * R
    SQ_CMP    = 4'd8,  // flag := (P - e * R < 0), nothing written
    SQ_TOPCMP = 4'd9   // one-cycle estimate of the same on the top field
  } seq_op_e;

  // Outcome of the one-cycle top-field compare
  typedef enum logic [1:0] {
    TOP_REJECT = 2'd0,  // e * R > P for sure
    TOP_ACCEPT = 2'd1,  // e * R <= P for sure
    TOP_UNSURE = 2'd2   // almost equal: a full compare is needed
  } top_res_e;

  // Index register commands
  typedef enum logic [2:0] {
    IX_NOP  = 3'd0,
    IX_LOAD = 3'd1,  // dst := src
    IX_ADD  = 3'd2,  // dst := dst + src
    IX_AND  = 3'd3,
    IX_OR   = 3'd4,
    IX_XOR  = 3'd5
  } ix_op_e;

  typedef enum logic [1:0] {
    IXS_IMM = 2'd0,  // immediate value
    IXS_REG = 2'd1,  // another index register
    IXS_ER  = 2'd2   // low 8 bits of ER
  } ix_src_e;

  // External (high-level) commands selected on the command pads
  typedef enum logic [4:0] {
    HC_NOP    = 5'd0,
    HC_WR128  = 5'd1,   // RAM128[addr] := wdata
    HC_RD128  = 5'd2,   // rdata := RAM128[addr]
    HC_WR8    = 5'd3,   // RAM8[addr] := wdata
    HC_RD8    = 5'd4,   // rdata := RAM8[addr]
    HC_SEQ    = 5'd5,   // one arithmetic command on register reg_b
    HC_MODMUL = 5'd6,   // RAM8 := A * B mod C
    HC_IDEA   = 5'd7,   // IDEA transform of wdata[63:0], keys at addr
    HC_RAND   = 5'd8,   // RAM128[addr] := PRNG word
    HC_SIGRD  = 5'd9,   // rdata := self-test signature (test mode only)
    HC_IX     = 5'd10,  // one INDEX_CALC command
    HC_ER     = 5'd11,  // one ER command (load from an indexed part, shifts)
    HC_STAT   = 5'd12   // rdata := index registers, ER, digit, flags
  } hl_cmd_e;

  // ER commands of HC_ER
  typedef enum logic [1:0] {
    ER_NOP  = 2'd0,
    ER_LOAD = 2'd1,  // ER := 24-bit part addressed by an index register
    ER_SHL6 = 2'd2,  // ER := ER << 6
    ER_SHR1 = 2'd3   // ER := ER >> 1
  } er_op_e;

endpackage
