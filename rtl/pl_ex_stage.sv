// pl_ex_stage: execute stage of the pipelined CPU with the EX/MEM register.
// ALU operand A is register data 1, or the shift amount when Cu_shift is set;
// operand B is register data 2, or the extended immediate when Cu_aluimm is
// set. The branch adder forms pc4 + imm (word addresses, so the offset is
// not shifted); for j the target is {pc4[31:26], index}. The ALU result,
// its zero flag, the target and the store data enter EX/MEM on the rising
// edge; the branch decision itself is made in MEM.
module pl_ex_stage
  import cpu_pkg::*, pl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  id_ex_t  idex,
  output logic [31:0] ealu,     // ALU result this cycle (for display)
  output ex_mem_t exmem
);
  logic [31:0] a, b, target;
  logic        zero;

  assign a = idex.shift  ? {27'h0, idex.sa} : idex.da;
  assign b = idex.aluimm ? idex.imm : idex.db;
  assign target = idex.jump ? {idex.pc4[31:26], idex.jidx} : idex.pc4 + idex.imm;

  alu u_alu (.a(a), .b(b), .op(idex.aluc), .result(ealu), .zero(zero));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      exmem <= '0;
    end else begin
      exmem <= '{wreg: idex.wreg, m2reg: idex.m2reg, wmem: idex.wmem,
                 branch: idex.branch, bne: idex.bne, jump: idex.jump,
                 zero: zero, alur: ealu, db: idex.db, target: target,
                 destr: idex.destr, tag: idex.tag};
    end
  end
endmodule
