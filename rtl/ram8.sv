// ram8: the 8x96 data RAM of the datapath.
//
// Holds one 768-bit data register (eight 96-bit fields). In long operations it holds the accumulator P, the running product of the modular multiply.
// One synchronous write port and one asynchronous read port: a field can be
// read, passed through the ALU and written back in the same clock cycle,
// which is how the sequencers process one 96-bit field per cycle.
// The 8x96 size follows the document; the port arrangement is this
// design's own choice. No reset: contents are undefined until written.
module ram8 #(
  parameter int DEPTH = 8,
  parameter int W     = 96,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
