// mc_ctrl: controller of the multiple-cycle CPU, a Moore state machine
// plus a little decode of the instruction register.
//
// Printed state sequence and codes: IF 0000 -> ID 0001, then
//   R-type: EX_R 0010 -> WB_R 1000 -> IF            (4 steps)
//   lw:     EX_LD 0011 -> MEM_RD 0101 -> WB_LS 1001 -> IF (5 steps)
//   sw:     EX_ST 0100 -> MEM_ST 0111 -> IF         (4 steps)
//   j:      back to IF straight from ID             (2 steps)
// Added by this design for the remaining instructions of the set:
//   beq/bne:        EX_BR 0110 -> IF                (3 steps)
//   addi/andi/ori:  EX_I 1010 -> WB_I 1011 -> IF    (4 steps)
// Unknown opcodes return to IF after ID.
//
// IF reads the instruction at PC into IR and writes PC+1 into PC. ID loads
// A and B from the register file and computes the branch target PC+imm
// into C; j writes the PC here. EX computes into C; MEM reads into DR or
// writes B to memory at C; WB writes the register file. A branch writes
// the PC from C in EX_BR when its condition (ALU zero after a subtract)
// holds.
//
// Display outputs: state_out (the state code), insn_type (1 R, 2 J, 3 I),
// insn_code (1 LD, 2 ST, 3 AD, 4 SU, 5 AN, 6 NO, 7 JP as printed; 8 OR,
// 9 SLL, A SRL, B SRA, C ADDI, D ANDI, E ORI, F BEQ/BNE assigned here) and
// insn_stage (1 IF, 2 ID, 3 EX, 4 MEM, 5 WB). Type and code describe the
// instruction in IR, so in IF they still show the previous instruction.
// Reset (asynchronous, active high) enters IF.
module mc_ctrl
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ir_data,
  input  logic        zero,
  output logic        write_pc,
  output logic        iord,       // memory address: 0 = PC, 1 = C
  output logic        write_mem,
  output logic        write_dr,
  output logic        write_ir,
  output logic        memtoreg,
  output logic        regdst,
  output logic [1:0]  pcsource,
  output logic        write_c,
  output logic [1:0]  alu_ctrl,
  output logic        alu_srca,
  output logic [1:0]  alu_srcb,
  output logic        write_a,
  output logic        write_b,
  output logic        write_reg,
  output logic [3:0]  state_out,
  output logic [3:0]  insn_type,
  output logic [3:0]  insn_code,
  output logic [3:0]  insn_stage
);
  typedef enum logic [3:0] {
    S_IF     = 4'b0000,
    S_ID     = 4'b0001,
    S_EX_R   = 4'b0010,
    S_EX_LD  = 4'b0011,
    S_EX_ST  = 4'b0100,
    S_MEM_RD = 4'b0101,
    S_EX_BR  = 4'b0110,
    S_MEM_ST = 4'b0111,
    S_WB_R   = 4'b1000,
    S_WB_LS  = 4'b1001,
    S_EX_I   = 4'b1010,
    S_WB_I   = 4'b1011
  } state_e;

  state_e state, state_nx;
  logic [5:0] op, fn;

  assign op = ir_data[31:26];
  assign fn = ir_data[5:0];
  assign state_out = state;

  always_comb begin
    state_nx = S_IF;
    case (state)
      S_IF: state_nx = S_ID;
      S_ID: begin
        case (op)
          OP_RTYPE:                 state_nx = S_EX_R;
          OP_LW:                    state_nx = S_EX_LD;
          OP_SW:                    state_nx = S_EX_ST;
          OP_BEQ, OP_BNE:           state_nx = S_EX_BR;
          OP_ADDI, OP_ANDI, OP_ORI: state_nx = S_EX_I;
          default:                  state_nx = S_IF;   // j and unknown
        endcase
      end
      S_EX_R:   state_nx = S_WB_R;
      S_EX_LD:  state_nx = S_MEM_RD;
      S_MEM_RD: state_nx = S_WB_LS;
      S_EX_ST:  state_nx = S_MEM_ST;
      S_EX_I:   state_nx = S_WB_I;
      default:  state_nx = S_IF;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= S_IF;
    else     state <= state_nx;
  end

  always_comb begin
    write_pc  = 1'b0; iord     = 1'b0; write_mem = 1'b0; write_dr = 1'b0;
    write_ir  = 1'b0; memtoreg = 1'b0; regdst    = 1'b0; pcsource = 2'b00;
    write_c   = 1'b0; alu_ctrl = 2'b00; alu_srca = 1'b0; alu_srcb = 2'b00;
    write_a   = 1'b0; write_b  = 1'b0; write_reg = 1'b0;
    case (state)
      S_IF: begin
        write_ir = 1'b1; alu_srcb = 2'b01; write_pc = 1'b1;
      end
      S_ID: begin
        write_a = 1'b1; write_b = 1'b1;
        alu_srcb = 2'b11; write_c = 1'b1;
        if (op == OP_J) begin
          pcsource = 2'b10; write_pc = 1'b1;
        end
      end
      S_EX_R: begin
        alu_srca = 1'b1; alu_ctrl = 2'b10; write_c = 1'b1;
      end
      S_EX_LD, S_EX_ST: begin
        alu_srca = 1'b1; alu_srcb = 2'b10; write_c = 1'b1;
      end
      S_EX_I: begin
        alu_srca = 1'b1; alu_srcb = 2'b10; write_c = 1'b1;
        alu_ctrl = (op == OP_ADDI) ? 2'b00 : 2'b11;
      end
      S_EX_BR: begin
        alu_srca = 1'b1; alu_ctrl = 2'b01; pcsource = 2'b01;
        write_pc = (op == OP_BNE) ? ~zero : zero;
      end
      S_MEM_RD: begin iord = 1'b1; write_dr = 1'b1; end
      S_MEM_ST: begin iord = 1'b1; write_mem = 1'b1; end
      S_WB_R:   begin write_reg = 1'b1; regdst = 1'b1; end
      S_WB_LS:  begin write_reg = 1'b1; memtoreg = 1'b1; end
      S_WB_I:   begin write_reg = 1'b1; end
      default: ;
    endcase
  end

  // Display decode
  always_comb begin
    insn_type = 4'd0;
    insn_code = 4'd0;
    case (op)
      OP_RTYPE: begin
        insn_type = 4'd1;
        case (fn)
          FN_ADD: insn_code = 4'h3;
          FN_SUB: insn_code = 4'h4;
          FN_AND: insn_code = 4'h5;
          FN_NOR: insn_code = 4'h6;
          FN_OR:  insn_code = 4'h8;
          FN_SLL: insn_code = 4'h9;
          FN_SRL: insn_code = 4'hA;
          FN_SRA: insn_code = 4'hB;
          default: insn_code = 4'h0;
        endcase
      end
      OP_J:    begin insn_type = 4'd2; insn_code = 4'h7; end
      OP_LW:   begin insn_type = 4'd3; insn_code = 4'h1; end
      OP_SW:   begin insn_type = 4'd3; insn_code = 4'h2; end
      OP_ADDI: begin insn_type = 4'd3; insn_code = 4'hC; end
      OP_ANDI: begin insn_type = 4'd3; insn_code = 4'hD; end
      OP_ORI:  begin insn_type = 4'd3; insn_code = 4'hE; end
      OP_BEQ, OP_BNE: begin insn_type = 4'd3; insn_code = 4'hF; end
      default: ;
    endcase
    case (state)
      S_IF:                       insn_stage = 4'd1;
      S_ID:                       insn_stage = 4'd2;
      S_EX_R, S_EX_LD, S_EX_ST,
      S_EX_BR, S_EX_I:            insn_stage = 4'd3;
      S_MEM_RD, S_MEM_ST:         insn_stage = 4'd4;
      default:                    insn_stage = 4'd5;
    endcase
  end
endmodule
