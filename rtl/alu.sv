// alu: 32-bit combinational ALU shared by both CPUs.
// Operations: add, sub, and, or, nor and the three shifts (sll, srl, sra).
// For shifts operand A carries the shift amount (its low five bits) and
// operand B the value shifted, as in MIPS where "sa" replaces rs. The zero
// output flags an all-zero result; beq/bne use it after a subtraction.
// The operation list follows the instruction table; the 4-bit operation
// encoding (cpu_pkg::alu_op_e) is this design's own. Adds and subtracts wrap
// silently (no overflow trap).
module alu
  import cpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    case (op)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_NOR: result = ~(a | b);
      ALU_SLL: result = b << a[4:0];
      ALU_SRL: result = b >> a[4:0];
      ALU_SRA: result = $signed(b) >>> a[4:0];
      default: result = a + b;
    endcase
  end
  assign zero = (result == 32'h0);
endmodule
