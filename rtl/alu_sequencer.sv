// alu_sequencer: the ALU_SEQUENCER, which executes arithmetic commands on
// whole data registers, one 96-bit field per clock cycle.
//
// Operands: P is the register in RAM8 together with an 8-bit extension
// (kept here, part of the ALU's carry logic) that holds the bits a long
// result grows above 768 bits, in two's complement; R is register 'rsel' of
// RAM128. Commands (seq_op_e): clear, transfer both ways, add, subtract,
// negate, multiply-accumulate P := 64*P + e*R (the shift by one 6-bit digit
// is done on the fly by carrying the top 6 bits of each field into the next
// one), reduce P := P - e*R, full compare sign(P - e*R), and a one-cycle
// compare estimate on the top field. Subtraction of e*R uses the ALU's
// negator: P + e*~R + e.
//
// The top-field compare takes field nfields-1 of P and R, with the
// extension, as 104- and 96-bit numbers TP and TR and forms v = TP - e*TR.
// v < 0 proves e*R > P; v >= 128 proves e*R <= P (e < 128, so the lower
// fields can change the answer only when 0 <= v < 128); otherwise the
// result is TOP_UNSURE and a full compare is needed. This follows the
// document's binary search "on the higher 96-bit part"; the threshold that
// makes it exact is this design's derivation.
//
// Timing: start is taken when the sequencer is idle or in the last cycle
// of a command (ready = 1), so commands can run back to back. A command
// then takes nfields cycles (TOPCMP: one), processing fields 0, 1, ... in
// order; done is high in its last cycle, where top_res and cmp_neg are
// valid. e, rsel and op are sampled with start. RAM read ports are
// asynchronous, so read, ALU and write-back of a field share one cycle.
// Which RAM holds which operand follows the document's modular multiply
// steps; the command encoding and this handshake are this design's own.
module alu_sequencer
  import rsaidea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  seq_op_e     op,
  input  logic [3:0]  rsel,
  input  logic [7:0]  e,
  input  logic [3:0]  nfields,     // 1..8 fields per register
  output logic        ready,
  output logic        busy,
  output logic        done,
  output top_res_e    top_res,
  output logic        cmp_neg,
  output logic [7:0]  ext,
  // RAM8 (read and write at the same field address)
  output logic [2:0]  r8_addr,
  output logic        r8_we,
  output logic [95:0] r8_wdata,
  input  logic [95:0] r8_rdata,
  // RAM128
  output logic [6:0]  r128_raddr,
  output logic        r128_we,
  output logic [6:0]  r128_waddr,
  output logic [95:0] r128_wdata,
  input  logic [95:0] r128_rdata,
  // shared ALU
  output alu_req_t    alu_req,
  input  alu_rsp_t    alu_rsp,
  output logic [7:0]  state_code
);
  logic        run, first;
  seq_op_e     op_q;
  logic [3:0]  reg_q, nf_q;
  logic [7:0]  e_q, carry;
  logic [2:0]  f;
  logic [5:0]  sh6;
  logic        last;
  logic [7:0]  ext_sub;      // extension of P - e*R
  logic signed [9:0] vhigh;  // upper part of the top-field estimate

  assign last  = run && ({1'b0, f} == nf_q - 4'd1);
  assign done  = last;
  assign busy  = run;
  assign ready = !run || last;

  assign r8_addr    = f;
  assign r128_raddr = {reg_q[3:0], f};
  assign r128_waddr = {reg_q[3:0], f};

  // ALU operands of the current field
  always_comb begin
    alu_req      = '0;
    alu_req.mode = ALU_MOD;
    unique case (op_q)
      SQ_CLR8:   begin alu_req.e = 8'd0; end
      SQ_LOAD8:  begin alu_req.x = r128_rdata; alu_req.e = 8'd1; end
      SQ_STORE8: begin alu_req.y = r8_rdata; end
      SQ_ADD:    begin alu_req.x = r128_rdata; alu_req.e = 8'd1; alu_req.y = r8_rdata; end
      SQ_SUB:    begin alu_req.x = r128_rdata; alu_req.negx = 1'b1; alu_req.e = 8'd1;
                       alu_req.y = r8_rdata; end
      SQ_NEG:    begin alu_req.x = r128_rdata; alu_req.negx = 1'b1; alu_req.e = 8'd1; end
      SQ_MULACC: begin alu_req.x = r128_rdata; alu_req.e = e_q;
                       alu_req.y = {r8_rdata[89:0], sh6}; end
      default:   begin alu_req.x = r128_rdata; alu_req.negx = 1'b1; alu_req.e = e_q;
                       alu_req.y = r8_rdata; end   // REDUCE, CMP, TOPCMP
    endcase
    if (first) begin
      unique case (op_q)
        SQ_SUB, SQ_NEG:                  alu_req.cin = 8'd1;
        SQ_REDUCE, SQ_CMP, SQ_TOPCMP:    alu_req.cin = e_q;
        default:                         alu_req.cin = 8'd0;
      endcase
    end else begin
      alu_req.cin = carry;
    end
  end

  assign r8_wdata   = alu_rsp.out;
  assign r128_wdata = alu_rsp.out;
  assign r8_we      = run && (op_q inside {SQ_CLR8, SQ_LOAD8, SQ_ADD, SQ_SUB,
                                           SQ_MULACC, SQ_REDUCE});
  assign r128_we    = run && (op_q inside {SQ_STORE8, SQ_NEG});

  // Extension of P - e*R: the extension of R is zero, negated all ones,
  // so it adds 0xFF*e = -e (mod 256).
  assign ext_sub = ext - e_q + alu_rsp.cout;
  assign cmp_neg = ext_sub[7];
  assign vhigh   = $signed({2'b00, alu_rsp.cout}) + $signed({2'b00, ext})
                 - $signed({2'b00, e_q});

  always_comb begin
    if (vhigh < 0)                                   top_res = TOP_REJECT;
    else if (vhigh > 0 || alu_rsp.out[95:7] != '0)   top_res = TOP_ACCEPT;
    else                                             top_res = TOP_UNSURE;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run   <= 1'b0;
      first <= 1'b0;
      op_q  <= SQ_CLR8;
      reg_q <= '0;
      nf_q  <= 4'd8;
      e_q   <= '0;
      carry <= '0;
      f     <= '0;
      sh6   <= '0;
      ext   <= '0;
    end else begin
      if (run) begin
        carry <= alu_rsp.cout;
        first <= 1'b0;
        if (op_q == SQ_MULACC) sh6 <= r8_rdata[95:90];
        f <= f + 3'd1;
        if (last) begin
          run <= 1'b0;
          unique case (op_q)
            SQ_CLR8, SQ_LOAD8: ext <= 8'd0;
            SQ_ADD:            ext <= ext + alu_rsp.cout;
            SQ_SUB:            ext <= ext + 8'hFF + alu_rsp.cout;
            SQ_MULACC:         ext <= {ext[1:0], r8_rdata[95:90]} + alu_rsp.cout;
            SQ_REDUCE:         ext <= ext_sub;
            default:           ;
          endcase
        end
      end
      if (start && ready) begin
        run   <= 1'b1;
        first <= 1'b1;
        op_q  <= op;
        reg_q <= rsel;
        e_q   <= e;
        nf_q  <= nfields;
        sh6   <= '0;
        f     <= (op == SQ_TOPCMP) ? 3'(nfields - 4'd1) : 3'd0;
      end
    end
  end

  assign state_code = {run, f, op_q};

  // A command must not be issued while another one is still running.
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
  a_nfields: assert property (@(posedge clk) disable iff (!rst_n)
                              start |-> (nfields >= 4'd1 && nfields <= 4'd8));
endmodule
