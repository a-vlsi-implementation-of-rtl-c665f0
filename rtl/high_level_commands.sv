// high_level_commands: decoder of the external commands.
//
// The circuit is driven through command pads: a 5-bit command code
// (32 possible commands, hl_cmd_e lists the ones used) is presented with
// cmd_valid while cmd_ready is high. Memory, PRNG, index/ER and status
// commands are done in the cycle they are accepted (one-cycle strobes
// host_*); HC_SEQ, HC_MODMUL and HC_IDEA start the corresponding sequencer
// (one-cycle *_go) and wait for its done. cmd_done pulses one cycle after a
// command has finished; cmd_ready is high only when idle. Unused codes act
// as NOP.
// The 32 pad-selected commands follow the document. There the decoder looks
// the command up in a jump table and runs a microcode program from the
// external code ROM; here each command starts a hardwired sequencer instead,
// which is this design's own choice. Because there is no microcode, HC_IX
// and HC_ER hand the microcode's index commands (index register and ER
// operations) to the host one at a time, as HC_SEQ does its arithmetic
// ones, and HC_STAT lets the host read the index registers, ER and the
// compare flag to make its decisions.
// Synchronous active-low reset.
module high_level_commands
  import rsaidea_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  hl_cmd_e    cmd,
  output logic       cmd_ready,
  output logic       cmd_done,
  output logic       host_wr128,
  output logic       host_rd128,
  output logic       host_wr8,
  output logic       host_rd8,
  output logic       host_rand,
  output logic       host_sig,
  output logic       host_ix,
  output logic       host_er,
  output logic       host_stat,
  output logic       seq_go,
  input  logic       seq_done,
  output logic       mm_go,
  input  logic       mm_done,
  output logic       idea_go,
  input  logic       idea_done,
  output logic [7:0] state_code
);
  typedef enum logic [2:0] {H_IDLE, H_SEQ, H_MM, H_IDEA, H_DONE} hstate_e;
  hstate_e st, st_n;
  logic    acc;

  assign acc       = (st == H_IDLE) && cmd_valid;
  assign cmd_ready = (st == H_IDLE);
  assign cmd_done  = (st == H_DONE);

  assign host_wr128 = acc && cmd == HC_WR128;
  assign host_rd128 = acc && cmd == HC_RD128;
  assign host_wr8   = acc && cmd == HC_WR8;
  assign host_rd8   = acc && cmd == HC_RD8;
  assign host_rand  = acc && cmd == HC_RAND;
  assign host_sig   = acc && cmd == HC_SIGRD;
  assign host_ix    = acc && cmd == HC_IX;
  assign host_er    = acc && cmd == HC_ER;
  assign host_stat  = acc && cmd == HC_STAT;
  assign seq_go     = acc && cmd == HC_SEQ;
  assign mm_go      = acc && cmd == HC_MODMUL;
  assign idea_go    = acc && cmd == HC_IDEA;

  always_comb begin
    st_n = st;
    unique case (st)
      H_IDLE: if (cmd_valid) begin
        unique case (cmd)
          HC_SEQ:    st_n = H_SEQ;
          HC_MODMUL: st_n = H_MM;
          HC_IDEA:   st_n = H_IDEA;
          default:   st_n = H_DONE;
        endcase
      end
      H_SEQ:   if (seq_done)  st_n = H_DONE;
      H_MM:    if (mm_done)   st_n = H_DONE;
      H_IDEA:  if (idea_done) st_n = H_DONE;
      default: st_n = H_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) st <= H_IDLE;
    else        st <= st_n;
  end

  assign state_code = {5'd0, st};
endmodule
