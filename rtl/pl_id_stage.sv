// pl_id_stage: instruction decode of the pipelined CPU with the register
// file and the ID/EX pipeline register.
//
// The control unit (pl_ctrl) decodes op/func. The register file is read
// combinationally with rs and rt; it is written on the falling edge by the
// WB stage (wb_we, wb_destr, wb_data), so an instruction in ID reads a value
// written back in the same cycle. The immediate is sign- or zero-extended as
// Cu_sext says, and the destination is rt or rd as Cu_regrt says. On the
// rising edge all of it enters ID/EX. Reset clears ID/EX to a bubble.
// dbg_addr/dbg_data read one register for the display.
module pl_id_stage
  import cpu_pkg::*, pl_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  if_id_t      ifid,
  input  logic        wb_we,
  input  logic [4:0]  wb_destr,
  input  logic [31:0] wb_data,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data,
  output id_ex_t      idex
);
  logic [31:0] inst;
  logic [31:0] da, db;
  logic cu_branch, cu_bne, cu_jump, cu_shift, cu_wmem, cu_mem2reg;
  logic cu_sext, cu_aluimm, cu_wreg, cu_regrt;
  alu_op_e cu_aluc;

  assign inst = ifid.inst;

  pl_ctrl u_ctrl (
    .op(inst[31:26]), .func(inst[5:0]),
    .cu_branch, .cu_bne, .cu_jump, .cu_shift, .cu_wmem, .cu_mem2reg,
    .cu_sext, .cu_aluc, .cu_aluimm, .cu_wreg, .cu_regrt
  );

  regfile #(.NEG_EDGE_WRITE(1'b1)) u_rf (
    .clk, .rst,
    .raddr1(inst[25:21]), .rdata1(da),
    .raddr2(inst[20:16]), .rdata2(db),
    .we(wb_we), .waddr(wb_destr), .wdata(wb_data),
    .dbg_addr, .dbg_data
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      idex <= '0;
    end else begin
      idex.wreg   <= cu_wreg;
      idex.m2reg  <= cu_mem2reg;
      idex.wmem   <= cu_wmem;
      idex.branch <= cu_branch;
      idex.bne    <= cu_bne;
      idex.jump   <= cu_jump;
      idex.aluc   <= cu_aluc;
      idex.aluimm <= cu_aluimm;
      idex.shift  <= cu_shift;
      idex.da     <= da;
      idex.db     <= db;
      idex.imm    <= {{16{cu_sext & inst[15]}}, inst[15:0]};
      idex.sa     <= inst[10:6];
      idex.jidx   <= inst[25:0];
      idex.pc4    <= ifid.pc4;
      idex.destr  <= cu_regrt ? inst[20:16] : inst[15:11];
      idex.tag    <= ifid.tag;
    end
  end
endmodule
