// cpu_pkg: shared encodings for the two MIPS-subset CPUs (pipelined and
// multiple-cycle). Opcode and function-field values are the MIPS values of
// the instruction table; the ALU operation code, the pipeline's instruction
// "type" tags and the multiple-cycle "code" tags partly follow the numbers the
// verification programs print and are otherwise this design's own choice.
package cpu_pkg;

  // Major opcodes (inst[31:26])
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_BEQ   = 6'b000100,
    OP_BNE   = 6'b000101,
    OP_ADDI  = 6'b001000,
    OP_ANDI  = 6'b001100,
    OP_ORI   = 6'b001101,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  // Function field of R-type instructions (inst[5:0])
  typedef enum logic [5:0] {
    FN_SLL = 6'b000000,
    FN_SRL = 6'b000010,
    FN_SRA = 6'b000011,
    FN_ADD = 6'b100000,
    FN_SUB = 6'b100010,
    FN_AND = 6'b100100,
    FN_OR  = 6'b100101,
    FN_NOR = 6'b100111
  } funct_e;

  // ALU operation (the pipeline's 4-bit ALUC)
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_NOR = 4'd4,
    ALU_SLL = 4'd5,
    ALU_SRL = 4'd6,
    ALU_SRA = 4'd7
  } alu_op_e;

  // Pipeline instruction type tag shown on the display for every stage.
  // 1 add, 2 sub, 3 and, 5 nor, 6 lw, 8 beq are the printed values; the rest
  // are assigned here. NONE marks a bubble.
  typedef enum logic [3:0] {
    IT_NONE = 4'h0,
    IT_ADD  = 4'h1,
    IT_SUB  = 4'h2,
    IT_AND  = 4'h3,
    IT_OR   = 4'h4,
    IT_NOR  = 4'h5,
    IT_LW   = 4'h6,
    IT_SW   = 4'h7,
    IT_BEQ  = 4'h8,
    IT_BNE  = 4'h9,
    IT_J    = 4'hA,
    IT_SLL  = 4'hB,
    IT_SRL  = 4'hC,
    IT_SRA  = 4'hD,
    IT_ADDI = 4'hE,
    IT_LOGI = 4'hF   // andi and ori share one tag
  } itype_e;

  // Stage tag for one pipeline stage: instruction type and number (the low
  // byte of the instruction's word address).
  typedef struct packed {
    itype_e     itype;
    logic [7:0] num;
  } stage_tag_t;

  localparam stage_tag_t TAG_NONE = '{itype: IT_NONE, num: 8'h00};

  // Classify an instruction word for the display tags. The all-zero word
  // (sll r0,r0,0, the canonical no-op) is reported as NONE.
  function automatic itype_e classify(input logic [31:0] inst);
    logic [5:0] op, fn;
    op = inst[31:26];
    fn = inst[5:0];
    if (inst == 32'h0) return IT_NONE;
    case (op)
      OP_RTYPE: begin
        case (fn)
          FN_ADD:  return IT_ADD;
          FN_SUB:  return IT_SUB;
          FN_AND:  return IT_AND;
          FN_OR:   return IT_OR;
          FN_NOR:  return IT_NOR;
          FN_SLL:  return IT_SLL;
          FN_SRL:  return IT_SRL;
          FN_SRA:  return IT_SRA;
          default: return IT_NONE;
        endcase
      end
      OP_LW:   return IT_LW;
      OP_SW:   return IT_SW;
      OP_BEQ:  return IT_BEQ;
      OP_BNE:  return IT_BNE;
      OP_J:    return IT_J;
      OP_ADDI: return IT_ADDI;
      OP_ANDI, OP_ORI: return IT_LOGI;
      default: return IT_NONE;
    endcase
  endfunction

  // True for instructions that change the PC (the pipeline resolves them in
  // MEM and fetches nothing until then).
  function automatic logic is_ctrl_xfer(input logic [31:0] inst);
    return inst[31:26] inside {OP_BEQ, OP_BNE, OP_J};
  endfunction

  // ASCII code of one hexadecimal digit (0-9, A-F)
  function automatic logic [7:0] hex_char(input logic [3:0] v);
    return (v < 4'd10) ? (8'h30 + {4'h0, v}) : (8'h37 + {4'h0, v});
  endfunction

endpackage
