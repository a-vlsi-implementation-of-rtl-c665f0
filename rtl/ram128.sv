// ram128: the 128x96 data RAM of the datapath.
//
// Holds sixteen 768-bit data registers (register r, field f at address {r, f}). It also holds the IDEA subkeys, six 16-bit subkeys per word, one word per round.
// One synchronous write port and one asynchronous read port: a field can be
// read, passed through the ALU and written back in the same clock cycle,
// which is how the sequencers process one 96-bit field per cycle.
// The 128x96 size follows the document; the port arrangement is this
// design's own choice. No reset: contents are undefined until written.
module ram128 #(
  parameter int DEPTH = 128,
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
