// pl_ctrl: control unit of the pipelined CPU, in the ID stage.
// Purely combinational decode of the opcode and function fields into the
// controller outputs the document lists: Cu_branch, Cu_shift, Cu_wmem,
// Cu_Mem2Reg, Cu_sext, Cu_aluc, Cu_aluimm, Cu_wreg and Cu_regrt. Because the
// instruction set also holds bne and j, two more outputs are added here:
// cu_bne (branch when not equal) and cu_jump. Unknown opcodes decode as a
// no-op (nothing written, no memory write, no branch).
module pl_ctrl
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output logic       cu_branch,  // beq or bne
  output logic       cu_bne,     // branch sense: 1 = bne
  output logic       cu_jump,    // j
  output logic       cu_shift,   // ALU A = sa instead of register data 1
  output logic       cu_wmem,
  output logic       cu_mem2reg,
  output logic       cu_sext,    // sign-extend (1) or zero-extend (0) imm
  output alu_op_e    cu_aluc,
  output logic       cu_aluimm,  // ALU B = imm instead of register data 2
  output logic       cu_wreg,
  output logic       cu_regrt    // destination rt (1) or rd (0)
);
  always_comb begin
    cu_branch  = 1'b0;
    cu_bne     = 1'b0;
    cu_jump    = 1'b0;
    cu_shift   = 1'b0;
    cu_wmem    = 1'b0;
    cu_mem2reg = 1'b0;
    cu_sext    = 1'b0;
    cu_aluc    = ALU_ADD;
    cu_aluimm  = 1'b0;
    cu_wreg    = 1'b0;
    cu_regrt   = 1'b0;
    case (op)
      OP_RTYPE: begin
        cu_wreg = 1'b1;
        case (func)
          FN_ADD: cu_aluc = ALU_ADD;
          FN_SUB: cu_aluc = ALU_SUB;
          FN_AND: cu_aluc = ALU_AND;
          FN_OR:  cu_aluc = ALU_OR;
          FN_NOR: cu_aluc = ALU_NOR;
          FN_SLL: begin cu_aluc = ALU_SLL; cu_shift = 1'b1; end
          FN_SRL: begin cu_aluc = ALU_SRL; cu_shift = 1'b1; end
          FN_SRA: begin cu_aluc = ALU_SRA; cu_shift = 1'b1; end
          default: cu_wreg = 1'b0;
        endcase
      end
      OP_ADDI: begin
        cu_wreg = 1'b1; cu_regrt = 1'b1; cu_aluimm = 1'b1; cu_sext = 1'b1;
        cu_aluc = ALU_ADD;
      end
      OP_ANDI: begin
        cu_wreg = 1'b1; cu_regrt = 1'b1; cu_aluimm = 1'b1; cu_aluc = ALU_AND;
      end
      OP_ORI: begin
        cu_wreg = 1'b1; cu_regrt = 1'b1; cu_aluimm = 1'b1; cu_aluc = ALU_OR;
      end
      OP_LW: begin
        cu_wreg = 1'b1; cu_regrt = 1'b1; cu_aluimm = 1'b1; cu_sext = 1'b1;
        cu_mem2reg = 1'b1; cu_aluc = ALU_ADD;
      end
      OP_SW: begin
        cu_wmem = 1'b1; cu_aluimm = 1'b1; cu_sext = 1'b1; cu_aluc = ALU_ADD;
      end
      OP_BEQ: begin
        cu_branch = 1'b1; cu_sext = 1'b1; cu_aluc = ALU_SUB;
      end
      OP_BNE: begin
        cu_branch = 1'b1; cu_bne = 1'b1; cu_sext = 1'b1; cu_aluc = ALU_SUB;
      end
      OP_J: cu_jump = 1'b1;
      default: ;
    endcase
  end
endmodule
