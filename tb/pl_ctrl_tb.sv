// pl_ctrl_tb: applies every opcode/function of the instruction set plus
// some unused ones and compares all controller outputs with a table written
// from the instruction semantics.
`timescale 1ns/1ps
module pl_ctrl_tb;
  import cpu_pkg::*;
  logic [5:0] op, func;
  logic br, bne, jmp, sh, wm, m2r, sx, ai, wr, rt;
  alu_op_e aluc;
  int checks = 0, failures = 0;

  pl_ctrl dut (.op, .func, .cu_branch(br), .cu_bne(bne), .cu_jump(jmp), .cu_shift(sh),
    .cu_wmem(wm), .cu_mem2reg(m2r), .cu_sext(sx), .cu_aluc(aluc), .cu_aluimm(ai),
    .cu_wreg(wr), .cu_regrt(rt));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected: {branch,bne,jump,shift,wmem,mem2reg,sext,aluimm,wreg,regrt}, aluc
  task automatic t(logic [5:0] o, logic [5:0] f, logic [9:0] e, alu_op_e ea, string n);
    op = o; func = f; #1;
    checks++;
    if ({br, bne, jmp, sh, wm, m2r, sx, ai, wr, rt} !== e || (wr && aluc !== ea) ||
        ((br) && aluc !== ALU_SUB)) begin
      failures++;
      $display("FAIL %s: got %b aluc %0d, exp %b aluc %0d", n,
               {br, bne, jmp, sh, wm, m2r, sx, ai, wr, rt}, aluc, e, ea);
    end
  endtask

  initial begin
    //                              b n j s w m x i w r
    t(6'h00, 6'h20, 10'b0_0_0_0_0_0_0_0_1_0, ALU_ADD, "add");
    t(6'h00, 6'h22, 10'b0_0_0_0_0_0_0_0_1_0, ALU_SUB, "sub");
    t(6'h00, 6'h24, 10'b0_0_0_0_0_0_0_0_1_0, ALU_AND, "and");
    t(6'h00, 6'h25, 10'b0_0_0_0_0_0_0_0_1_0, ALU_OR,  "or");
    t(6'h00, 6'h27, 10'b0_0_0_0_0_0_0_0_1_0, ALU_NOR, "nor");
    t(6'h00, 6'h00, 10'b0_0_0_1_0_0_0_0_1_0, ALU_SLL, "sll");
    t(6'h00, 6'h02, 10'b0_0_0_1_0_0_0_0_1_0, ALU_SRL, "srl");
    t(6'h00, 6'h03, 10'b0_0_0_1_0_0_0_0_1_0, ALU_SRA, "sra");
    t(6'h00, 6'h08, 10'b0_0_0_0_0_0_0_0_0_0, ALU_ADD, "unknown func");
    t(6'h08, 6'h3f, 10'b0_0_0_0_0_0_1_1_1_1, ALU_ADD, "addi");
    t(6'h0c, 6'h3f, 10'b0_0_0_0_0_0_0_1_1_1, ALU_AND, "andi");
    t(6'h0d, 6'h3f, 10'b0_0_0_0_0_0_0_1_1_1, ALU_OR,  "ori");
    t(6'h23, 6'h00, 10'b0_0_0_0_0_1_1_1_1_1, ALU_ADD, "lw");
    t(6'h2b, 6'h00, 10'b0_0_0_0_1_0_1_1_0_0, ALU_ADD, "sw");
    t(6'h04, 6'h00, 10'b1_0_0_0_0_0_1_0_0_0, ALU_SUB, "beq");
    t(6'h05, 6'h00, 10'b1_1_0_0_0_0_1_0_0_0, ALU_SUB, "bne");
    t(6'h02, 6'h00, 10'b0_0_1_0_0_0_0_0_0_0, ALU_ADD, "j");
    t(6'h3f, 6'h00, 10'b0_0_0_0_0_0_0_0_0_0, ALU_ADD, "unknown op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
