// idea_core: IDEA control, one 64-bit IDEA transform in 50 clock cycles on
// the shared ALU.
//
// IDEA works on four 16-bit words with three operations: XOR, addition
// mod 2^16 and multiplication mod 2^16+1 (the word 0 stands for 2^16).
// Each of the 8 rounds needs four multiplications, of which the last two
// depend on each other. The ALU is used as two 16x16 multipliers in one
// cycle and for the low-high reduction (ab mod 2^16+1 = lo - hi, plus
// 2^16+1 if that is negative) in the next one, so every multiplication
// takes 2 cycles and a round 3 x 2 = 6 cycles:
//   step 0  (MUL) X1*K1 and X4*K4
//   step 1  (RED) Y1, Y4 from the products; Y2 = X2+K2, Y3 = X3+K3 on the
//                 two 16-bit adders
//   step 2  (MUL) (Y1^Y3)*K5 on both multipliers
//   step 3  (RED) M3 = (Y1^Y3)(.)K5 and, on the second pair of slices,
//                 A3 = M3 + (Y2^Y4), both selected by the sign of lo-hi
//   step 4  (MUL) A3*K6 on both multipliers
//   step 5  (RED) M4 = A3(.)K6 and M3 + M4 the same way
//   new X = (Y1^M4, Y3^M4, Y2^(M3+M4), Y4^(M3+M4))
// The output transform is one more MUL/RED pair: (X1(.)K49, X3+K50,
// X2+K51, X4(.)K52). 8*6 + 2 = 50 cycles. When an operand of a
// multiplication is 0 (meaning 2^16) the product is replaced by
// lo = 0, hi = other operand (2^16 if both are 0) before the reduction.
//
// Subkeys come from RAM128: word key_base + r holds the six subkeys of
// round r as {K1, K2, K3, K4, K5, K6} (K1 in bits 95:80); word key_base + 8
// holds {K49, K50, K51, K52} in bits 95:32. Pointing key_base at an
// encryption or a decryption key set selects the direction.
//
// Interface: a start pulse while idle takes din = {X1, X2, X3, X4}; busy is
// high for the 50 working cycles; done pulses in the cycle after the last
// one, when dout holds the result (kept until the next start).
// The round structure, the 6-cycle schedule of Table 1 and the 50-cycle
// total follow the document; the key word layout, the handshake and the
// zero-operand handling are this design's own choices.
// The ALU carry output (alu_rsp.cout) is not needed by IDEA and is unused.
module idea_core
  import rsaidea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [6:0]  key_base,
  input  logic [63:0] din,
  output logic [63:0] dout,
  output logic        busy,
  output logic        done,
  // RAM128 subkey read
  output logic [6:0]  key_addr,
  input  logic [95:0] key_word,
  // shared ALU
  output alu_req_t    alu_req,
  input  alu_rsp_t    alu_rsp,
  output logic [7:0]  state_code
);
  logic [3:0]  rnd;      // 0..7 rounds, 8 output transform
  logic [2:0]  step;     // 0..5
  logic [6:0]  kb;
  logic [15:0] x1, x2, x3, x4, y1, y2, y3, y4, m3, a3;
  logic [15:0] k1, k2, k3, k4, k5, k6;
  logic [15:0] ma, mb, mc, md;      // operands of this cycle's multiply
  logic [15:0] pa1, pb1, pa2, pb2;  // registered operands of last multiply
  logic [31:0] p1, p2;              // registered products
  logic [15:0] lo1, lo2;
  logic [16:0] hi1, hi2;
  logic [15:0] sel1, sel2;
  logic        fin;

  assign key_addr = kb + 7'(rnd);
  assign {k1, k2, k3, k4, k5, k6} = key_word;

  // low-high split of a product, with 0 standing for 2^16
  function automatic logic [32:0] lohi(input logic [31:0] p, input logic [15:0] a,
                                       input logic [15:0] b);
    if (a == 16'd0 && b == 16'd0) return {17'h10000, 16'd0};
    else if (a == 16'd0)          return {1'b0, b, 16'd0};
    else if (b == 16'd0)          return {1'b0, a, 16'd0};
    else                          return {1'b0, p};
  endfunction

  assign {hi1, lo1} = lohi(p1, pa1, pb1);
  assign {hi2, lo2} = lohi(p2, pa2, pb2);

  // multiply operands per step
  always_comb begin
    ma = x1; mb = k1; md = x4; mc = k4;
    unique case (step)
      3'd2:    begin ma = y1 ^ y3; mb = k5; md = y1 ^ y3; mc = k5; end
      3'd4:    begin ma = a3;      mb = k6; md = a3;      mc = k6; end
      default: ;
    endcase
  end

  always_comb begin
    alu_req      = '0;
    alu_req.mode = step[0] ? ALU_IDEA_RED : ALU_IDEA_MUL;
    alu_req.ma   = ma;
    alu_req.mb   = mb;
    alu_req.mc   = mc;
    alu_req.md   = md;
    alu_req.lo1  = lo1;
    alu_req.hi1  = hi1;
    alu_req.lo2  = lo2;
    alu_req.hi2  = hi2;
    unique case (step)
      3'd3:    alu_req.add2 = y2 ^ y4;
      3'd5:    alu_req.add2 = m3;
      default: alu_req.add2 = 16'd0;
    endcase
  end

  // candidate selection: {alu24.4, alu24.3, alu24.2, alu24.1}
  always_comb begin
    sel1 = alu_rsp.out[23] ? alu_rsp.out[63:48] : alu_rsp.out[15:0];
    if (step == 3'd1)  // two independent products: each pair by its own sign
      sel2 = alu_rsp.out[47] ? alu_rsp.out[87:72] : alu_rsp.out[39:24];
    else               // sum candidates follow the sign of lo1 - hi1
      sel2 = alu_rsp.out[23] ? alu_rsp.out[87:72] : alu_rsp.out[39:24];
  end

  assign fin = busy && rnd == 4'd8 && step == 3'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rnd  <= '0;
      step <= '0;
      kb   <= '0;
      dout <= '0;
      {x1, x2, x3, x4, y1, y2, y3, y4, m3, a3} <= '0;
      {pa1, pb1, pa2, pb2, p1, p2} <= '0;
    end else begin
      done <= fin;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          rnd  <= '0;
          step <= '0;
          kb   <= key_base;
          {x1, x2, x3, x4} <= din;
        end
      end else begin
        if (!step[0]) begin  // multiply step: keep products and operands
          p1 <= {alu_rsp.out[71:48], alu_rsp.out[7:0]};
          p2 <= {alu_rsp.out[95:72], alu_rsp.out[31:24]};
          pa1 <= ma; pb1 <= mb; pa2 <= md; pb2 <= mc;
        end
        unique case (step)
          3'd1: begin
            y1 <= sel1;
            y4 <= sel2;
            y2 <= x2 + k2;
            y3 <= x3 + k3;
            if (rnd == 4'd8) dout <= {sel1, x3 + k2, x2 + k3, sel2};
          end
          3'd3: begin m3 <= sel1; a3 <= sel2; end
          3'd5: begin
            x1 <= y1 ^ sel1;
            x2 <= y3 ^ sel1;
            x3 <= y2 ^ sel2;
            x4 <= y4 ^ sel2;
          end
          default: ;
        endcase
        if (fin) begin
          busy <= 1'b0;
        end else if (step == 3'd5) begin
          step <= 3'd0;
          rnd  <= rnd + 4'd1;
        end else begin
          step <= step + 3'd1;
        end
      end
    end
  end

  assign state_code = {busy, rnd, step};
endmodule
