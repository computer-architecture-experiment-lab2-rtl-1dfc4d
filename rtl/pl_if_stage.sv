// pl_if_stage: instruction fetch of the pipelined CPU with the PC register
// and the IF/ID pipeline register.
//
// Next-PC: npc = mem_taken ? mem_target : pc + 1 (word addresses). The
// instruction memory is addressed with npc and read on the falling edge, so
// on the rising edge the PC takes npc and IF/ID takes the word at npc
// together with npc + 1. That is why the PC resets to FFFFFFFF: the first
// rising edge after reset loads PC = 0 and the instruction at address 0.
//
// Control transfers (beq, bne, j) are resolved in MEM; the taken flag and
// target reach this stage from the MEM/WB register. While such an
// instruction sits in ID, EX or MEM the stage holds the PC and feeds NONE
// bubbles (an all-zero instruction) into IF/ID. A control transfer fetched
// in cycle n is thus followed by exactly three NONE slots and the next real
// fetch is in cycle n+4, from the target or from the fall-through address.
// The pipeline has no hazard detection and no forwarding (left to later
// labs); software must space dependent instructions.
//
// if_tag is the stage tag (type, number) of what is being fetched this
// cycle; ifid.tag is the tag of the instruction now in ID.
module pl_if_stage
  import cpu_pkg::*, pl_pkg::*;
#(
  parameter int    IM_DEPTH  = 512,
  parameter string IM_INIT   = "",
  parameter logic [31:0] RESET_PC = 32'hFFFF_FFFF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ex_ctrl,     // control transfer in EX
  input  logic        mem_ctrl,    // control transfer in MEM
  input  logic        mem_taken,   // from MEM/WB: redirect
  input  logic [31:0] mem_target,  // from MEM/WB: redirect address
  output logic [31:0] pc,
  output logic [31:0] npc,
  output logic        hold,
  output stage_tag_t  if_tag,
  output if_id_t      ifid
);
  logic [31:0] im_dout;
  logic        id_ctrl;

  assign id_ctrl = is_ctrl_xfer(ifid.inst);
  assign hold    = id_ctrl | ex_ctrl | mem_ctrl;
  assign npc     = mem_taken ? mem_target : pc + 32'd1;

  pl_imem #(.DEPTH(IM_DEPTH), .INIT_FILE(IM_INIT)) u_imem (
    .clk  (clk),
    .addr (npc[$clog2(IM_DEPTH)-1:0]),
    .dout (im_dout)
  );

  assign if_tag = hold ? TAG_NONE : '{itype: classify(im_dout), num: npc[7:0]};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pc   <= RESET_PC;
      ifid <= IF_ID_NOP;
    end else if (hold) begin
      ifid <= IF_ID_NOP;
    end else begin
      pc   <= npc;
      ifid <= '{inst: im_dout, pc4: npc + 32'd1, tag: if_tag};
    end
  end
endmodule
