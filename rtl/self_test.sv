// self_test: state hashing of all state machines.
//
// Every enabled cycle the state code of each of the NFSM state machines is
// hashed into its own 8-bit signature analyser; the analysers run in
// parallel. After 255 hashed states the four 8-bit signatures are shifted
// together, as one 32-bit word {sa[3], sa[2], sa[1], sa[0]}, into the 32-bit
// analyser, and the 8-bit analysers restart from the state of that cycle.
// The 32-bit signature is visible only in test mode (zero otherwise). A
// known program run from reset gives a known signature, so the result shows
// both that the right answer came out and that it was reached through the
// expected sequence of states.
// The parallel 8-bit analysers, the 255-state period and the 32-bit
// readout in test mode follow the document; which state bits are hashed,
// the enable and the polynomials are this design's own.
// Timing: the fold happens in the cycle that hashes state number 256.
module self_test #(
  parameter int NFSM = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [NFSM-1:0][7:0] state,
  input  logic                 test_mode,
  output logic [31:0]          signature,
  output logic [7:0]           count
);
  logic             fold;
  logic [NFSM-1:0][7:0] sa;
  logic [31:0]      sig32;
  logic [31:0]      fold_word;

  assign fold = en && (count == 8'd255);

  always_ff @(posedge clk) begin
    if (!rst_n)   count <= 8'd0;
    else if (en)  count <= fold ? 8'd1 : count + 8'd1;
  end

  for (genvar i = 0; i < NFSM; i++) begin : g_sa
    sig_analyser8 u_sa8 (
      .clk(clk), .rst_n(rst_n), .en(en), .clear(fold),
      .din(state[i]), .sig(sa[i])
    );
  end

  always_comb begin
    fold_word = '0;
    for (int i = 0; i < NFSM && i < 4; i++) fold_word[8*i +: 8] = sa[i];
  end

  sig_analyser32 u_sa32 (
    .clk(clk), .rst_n(rst_n), .en(fold), .clear(1'b0),
    .din(fold_word), .sig(sig32)
  );

  assign signature = test_mode ? sig32 : 32'd0;
endmodule
