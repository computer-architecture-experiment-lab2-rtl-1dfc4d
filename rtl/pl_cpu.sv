// pl_cpu: five-stage pipelined CPU for a MIPS subset (add, sub, and, or,
// nor, sll, srl, sra, addi, andi, ori, lw, sw, beq, bne, j).
//
// Stages IF, ID, EX, MEM, WB, each module holding the pipeline register at
// its output: IF/ID in pl_if_stage, ID/EX in pl_id_stage, EX/MEM in
// pl_ex_stage, MEM/WB in pl_mem_stage. Instruction and data memories are
// separate (no structural hazard on memory) and work on the falling edge; the
// register file writes on the falling edge and reads combinationally, so
// WB and ID share it in one cycle. Pipeline registers move on the rising
// edge. All addresses are word addresses.
//
// Control transfers are resolved in MEM and applied to the fetch one cycle
// later; the fetch inserts three NONE bubbles after each beq, bne or j.
// There is no stall logic and no forwarding: a result can be read by the
// fourth instruction after its producer, not earlier.
//
// Debug outputs: the PC, the next PC, the stage tag (type, number) of each
// stage and of the instruction just retired, the fetch-bubble flag, the instruction in ID, the ALU result in EX, the clock count since
// reset, and one register chosen by dbg_addr.
module pl_cpu
  import cpu_pkg::*, pl_pkg::*;
#(
  parameter int    IM_DEPTH = 512,
  parameter int    DM_DEPTH = 512,
  parameter string IM_INIT  = "rtl/pl_prog.hex",
  parameter string DM_INIT  = "rtl/pl_data.hex"
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data,
  output logic [31:0] pc,
  output logic [31:0] npc,
  output logic [31:0] id_inst,
  output logic [31:0] ex_alu,
  output logic [31:0] clk_count,
  output stage_tag_t  tag_if,
  output stage_tag_t  tag_id,
  output stage_tag_t  tag_ex,
  output stage_tag_t  tag_mem,
  output stage_tag_t  tag_wb,
  output stage_tag_t  tag_out,     // instruction that left WB last cycle
  output logic        fetch_hold   // fetch is inserting a bubble
);
  if_id_t  ifid;
  id_ex_t  idex;
  ex_mem_t exmem;
  mem_wb_t memwb;
  logic        wb_we;
  logic [4:0]  wb_destr;
  logic [31:0] wb_data;

  pl_if_stage #(.IM_DEPTH(IM_DEPTH), .IM_INIT(IM_INIT)) u_if (
    .clk, .rst,
    .ex_ctrl    (idex.branch | idex.jump),
    .mem_ctrl   (exmem.branch | exmem.jump),
    .mem_taken  (memwb.taken),
    .mem_target (memwb.target),
    .pc, .npc, .hold(fetch_hold),
    .if_tag     (tag_if),
    .ifid
  );

  pl_id_stage u_id (
    .clk, .rst, .ifid,
    .wb_we, .wb_destr, .wb_data,
    .dbg_addr, .dbg_data,
    .idex
  );

  pl_ex_stage u_ex (.clk, .rst, .idex, .ealu(ex_alu), .exmem);

  pl_mem_stage #(.DM_DEPTH(DM_DEPTH), .DM_INIT(DM_INIT)) u_mem (
    .clk, .rst, .exmem, .memwb
  );

  pl_wb_stage u_wb (.clk, .rst, .memwb, .wb_we, .wb_destr, .wb_data, .out_tag(tag_out));

  assign id_inst = ifid.inst;
  assign tag_id  = ifid.tag;
  assign tag_ex  = idex.tag;
  assign tag_mem = exmem.tag;
  assign tag_wb  = memwb.tag;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) clk_count <= '0;
    else     clk_count <= clk_count + 32'd1;
  end
endmodule
