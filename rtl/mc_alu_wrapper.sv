// mc_alu_wrapper: ALU, its operand multiplexers and the ALU controller of
// the multiple-cycle CPU (combinational).
//   ALUSrcA: 0 = PC, 1 = register A (or the shift amount IR[10:6] when the
//            instruction is a shift and the ALU works for the R-type EX step)
//   ALUSrcB: 00 = register B, 01 = one word (PC increment),
//            10 = immediate (sign-extended; zero-extended for andi/ori),
//            11 = branch offset (sign-extended immediate; word addressing,
//            so not shifted)
//   ALUC:    00 = add, 01 = subtract, 10 = R-type (operation from func),
//            11 = I-type logic (operation from the opcode: andi/ori)
// The two-bit ALUC and its split into an ALU controller follow the
// datapath figure; the encodings of ALUC and the selects are this design's.
module mc_alu_wrapper
  import cpu_pkg::*;
(
  input  logic [31:0] a_data,
  input  logic [31:0] b_data,
  input  logic [31:0] ir_data,
  input  logic [31:0] pc,
  input  logic        alu_srca,
  input  logic [1:0]  alu_srcb,
  input  logic [1:0]  alu_ctrl,
  output logic        zero,
  output logic [31:0] alu_out
);
  logic [5:0]  op, fn;
  logic        is_shift;
  logic [31:0] sext, zext, a, b;
  alu_op_e     aop;

  assign op   = ir_data[31:26];
  assign fn   = ir_data[5:0];
  assign sext = {{16{ir_data[15]}}, ir_data[15:0]};
  assign zext = {16'h0, ir_data[15:0]};
  assign is_shift = (alu_ctrl == 2'b10) && (fn inside {FN_SLL, FN_SRL, FN_SRA});

  always_comb begin
    if (!alu_srca)     a = pc;
    else if (is_shift) a = {27'h0, ir_data[10:6]};
    else               a = a_data;
    case (alu_srcb)
      2'b00:   b = b_data;
      2'b01:   b = 32'd1;
      2'b10:   b = (op inside {OP_ANDI, OP_ORI}) ? zext : sext;
      default: b = sext;
    endcase
  end

  // ALU controller
  always_comb begin
    case (alu_ctrl)
      2'b00: aop = ALU_ADD;
      2'b01: aop = ALU_SUB;
      2'b10: begin
        case (fn)
          FN_SUB:  aop = ALU_SUB;
          FN_AND:  aop = ALU_AND;
          FN_OR:   aop = ALU_OR;
          FN_NOR:  aop = ALU_NOR;
          FN_SLL:  aop = ALU_SLL;
          FN_SRL:  aop = ALU_SRL;
          FN_SRA:  aop = ALU_SRA;
          default: aop = ALU_ADD;
        endcase
      end
      default: aop = (op == OP_ORI) ? ALU_OR : ALU_AND;
    endcase
  end

  alu u_alu (.a(a), .b(b), .op(aop), .result(alu_out), .zero(zero));
endmodule
