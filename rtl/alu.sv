// alu: the shared 96-bit ALU, built from four alu24 slices.
//
// Slice u[0..3] are the document's alu24.1, alu24.2, alu24.3, alu24.4.
// Three configurations, chosen by req.mode:
//  * ALU_MOD (long-number mode): the slices are chained u0->u1->u2->u3 as a
//    96x8 multiplier-adder with negator:
//        {cout, out} = (negx ? ~x : x) * e + y + cin
//    e = 1 makes it an adder, negx with cin = e a subtracter of e * x.
//    The 8-bit cout is the carry the sequencer keeps for the next field.
//  * ALU_IDEA_MUL: two 16x16 multipliers. alu24.1 forms ma[7:0]*mb and
//    alu24.3 adds ma[15:8]*mb to the upper part of that (Fig. 1 wiring);
//    likewise alu24.2/alu24.4 for md*mc. Products:
//        ma*mb = {out[71:48], out[7:0]},  md*mc = {out[95:72], out[31:24]}
//  * ALU_IDEA_RED: the low-high reduction step. Each slice yields one
//    candidate, all 24 bits wide (two's complement):
//        alu24.1: lo1 - hi1          alu24.3: lo1 - hi1 + F4
//        alu24.2: lo2 - hi2 + add2   alu24.4: lo2 - hi2 + add2 + F4
//    The sequencer picks the candidate by the sign of the first of a pair.
// Combinational. Slice widths, the mode set and the Fig. 1 wiring follow the
// document; how the candidates are formed inside the slices is this design's
// own choice.
//
// Bit 8 of each slice's carry is left unused: in ALU_MOD the sum of the
// product, y and an 8-bit carry fits in 32 bits, and the IDEA modes keep
// their results inside the 24 output bits.
module alu
  import rsaidea_pkg::*;
(
  input  alu_req_t req,
  output alu_rsp_t rsp
);
  logic [23:0] x0, x1, x2, x3, y0, y1, y2, y3, z0, z1, z2, z3;
  logic [7:0]  e0, e1, e2, e3, c0, c1, c2, c3;
  logic        n0, n1, n2, n3;
  logic [23:0] o0, o1, o2, o3;
  logic [8:0]  co0, co1, co2, co3;

  // alu24.1
  assign x0 = (req.mode == ALU_MOD)      ? req.x[23:0] :
              (req.mode == ALU_IDEA_MUL) ? {8'd0, req.mb} : {7'd0, req.hi1};
  assign n0 = (req.mode == ALU_MOD) ? req.negx : (req.mode == ALU_IDEA_RED);
  assign e0 = (req.mode == ALU_MOD)      ? req.e :
              (req.mode == ALU_IDEA_MUL) ? req.ma[7:0] : 8'd1;
  assign y0 = (req.mode == ALU_MOD)      ? req.y[23:0] :
              (req.mode == ALU_IDEA_MUL) ? 24'd0 : {8'd0, req.lo1};
  assign z0 = 24'd0;
  assign c0 = (req.mode == ALU_MOD)      ? req.cin :
              (req.mode == ALU_IDEA_MUL) ? 8'd0 : 8'd1;

  // alu24.2
  assign x1 = (req.mode == ALU_MOD)      ? req.x[47:24] :
              (req.mode == ALU_IDEA_MUL) ? {8'd0, req.mc} : {7'd0, req.hi2};
  assign n1 = (req.mode == ALU_MOD) ? req.negx : (req.mode == ALU_IDEA_RED);
  assign e1 = (req.mode == ALU_MOD)      ? req.e :
              (req.mode == ALU_IDEA_MUL) ? req.md[7:0] : 8'd1;
  assign y1 = (req.mode == ALU_MOD)      ? req.y[47:24] :
              (req.mode == ALU_IDEA_MUL) ? 24'd0 : {8'd0, req.lo2};
  assign z1 = (req.mode == ALU_IDEA_RED) ? {8'd0, req.add2} : 24'd0;
  assign c1 = (req.mode == ALU_MOD)      ? co0[7:0] :
              (req.mode == ALU_IDEA_MUL) ? 8'd0 : 8'd1;

  // alu24.3
  assign x2 = (req.mode == ALU_MOD)      ? req.x[71:48] :
              (req.mode == ALU_IDEA_MUL) ? {8'd0, req.mb} : {7'd0, req.hi1};
  assign n2 = (req.mode == ALU_MOD) ? req.negx : (req.mode == ALU_IDEA_RED);
  assign e2 = (req.mode == ALU_MOD)      ? req.e :
              (req.mode == ALU_IDEA_MUL) ? req.ma[15:8] : 8'd1;
  assign y2 = (req.mode == ALU_MOD)      ? req.y[71:48] :
              (req.mode == ALU_IDEA_MUL) ? {8'd0, o0[23:8]} : {8'd0, req.lo1};
  assign z2 = (req.mode == ALU_IDEA_RED) ? F4 - 24'd1 : 24'd0;  // + 1 in c2
  assign c2 = (req.mode == ALU_MOD)      ? co1[7:0] :
              (req.mode == ALU_IDEA_MUL) ? 8'd0 : 8'd2;

  // alu24.4
  assign x3 = (req.mode == ALU_MOD)      ? req.x[95:72] :
              (req.mode == ALU_IDEA_MUL) ? {8'd0, req.mc} : {7'd0, req.hi2};
  assign n3 = (req.mode == ALU_MOD) ? req.negx : (req.mode == ALU_IDEA_RED);
  assign e3 = (req.mode == ALU_MOD)      ? req.e :
              (req.mode == ALU_IDEA_MUL) ? req.md[15:8] : 8'd1;
  assign y3 = (req.mode == ALU_MOD)      ? req.y[95:72] :
              (req.mode == ALU_IDEA_MUL) ? {8'd0, o1[23:8]} : {8'd0, req.lo2};
  assign z3 = (req.mode == ALU_IDEA_RED) ? {7'd0, 1'b1, req.add2} : 24'd0;
  assign c3 = (req.mode == ALU_MOD)      ? co2[7:0] :
              (req.mode == ALU_IDEA_MUL) ? 8'd0 : 8'd2;

  alu24 u_alu24_1 (.x(x0), .negx(n0), .e(e0), .y(y0), .z(z0), .cin(c0), .out(o0), .cout(co0));
  alu24 u_alu24_2 (.x(x1), .negx(n1), .e(e1), .y(y1), .z(z1), .cin(c1), .out(o1), .cout(co1));
  alu24 u_alu24_3 (.x(x2), .negx(n2), .e(e2), .y(y2), .z(z2), .cin(c2), .out(o2), .cout(co2));
  alu24 u_alu24_4 (.x(x3), .negx(n3), .e(e3), .y(y3), .z(z3), .cin(c3), .out(o3), .cout(co3));

  assign rsp.out  = {o3, o2, o1, o0};
  assign rsp.cout = co3[7:0];
endmodule
