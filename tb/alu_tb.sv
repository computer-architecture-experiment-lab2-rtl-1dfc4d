// alu_tb: drives the ALU with directed and random operands for every
// operation and compares result and zero flag with values computed here.
`timescale 1ns/1ps
module alu_tb;
  import cpu_pkg::*;
  logic [31:0] a, b, result, exp;
  alu_op_e op;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .result, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] y);
    logic [63:0] ext;
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x + ~y + 1;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_NOR: return ~x & ~y;
      ALU_SLL: return y << x[4:0];
      ALU_SRL: return y >> x[4:0];
      ALU_SRA: begin ext = {{32{y[31]}}, y}; ext = ext >> x[4:0]; return ext[31:0]; end
      default: return 'x;
    endcase
  endfunction

  task automatic one(alu_op_e o, logic [31:0] x, logic [31:0] y);
    op = o; a = x; b = y; #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h/%b exp %h", o, x, y, result, zero, exp);
    end
  endtask

  initial begin
    alu_op_e o;
    one(ALU_SUB, 32'd5, 32'd5);
    one(ALU_SRA, 32'd4, 32'h8000_0000);
    one(ALU_SRL, 32'd4, 32'h8000_0000);
    one(ALU_NOR, 32'h0, 32'h0);
    for (int i = 0; i < 8; i++) begin
      o = alu_op_e'(i);
      for (int k = 0; k < 200; k++) one(o, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
