// pl_ex_stage_tb: random ID/EX contents through the execute stage. Checks
// the operand selection (shift amount, immediate), the ALU result and zero
// flag against values computed here, the branch and jump targets, and that
// the control bits, store data, destination and tag reach EX/MEM one edge
// later.
`timescale 1ns/1ps
module pl_ex_stage_tb;
  import cpu_pkg::*, pl_pkg::*;
  logic clk = 0, rst = 0;
  id_ex_t idex;
  ex_mem_t exmem;
  logic [31:0] ealu;
  int checks = 0, failures = 0;

  pl_ex_stage dut (.clk, .rst, .idex, .ealu, .exmem);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    logic [31:0] a, b, r, tgt;
    #1 rst = 1; #3 rst = 0;
    for (int k = 0; k < 500; k++) begin
      @(posedge clk); #1;
      idex = '{wreg: 1'($urandom), m2reg: 1'($urandom), wmem: 1'($urandom),
               branch: 1'($urandom), bne: 1'($urandom), jump: 1'($urandom),
               aluc: alu_op_e'($urandom_range(0, 7)), aluimm: 1'($urandom),
               shift: 1'($urandom), da: $urandom, db: $urandom, imm: $urandom,
               sa: 5'($urandom), jidx: 26'($urandom), pc4: $urandom,
               destr: 5'($urandom), tag: '{itype: itype_e'($urandom), num: 8'($urandom)}};
      if (k % 5 == 0) begin idex.db = idex.da; idex.aluc = ALU_SUB; idex.aluimm = 0; idex.shift = 0; end
      a = idex.shift ? 32'(idex.sa) : idex.da;
      b = idex.aluimm ? idex.imm : idex.db;
      case (idex.aluc)
        ALU_ADD: r = a + b;
        ALU_SUB: r = a - b;
        ALU_AND: r = a & b;
        ALU_OR:  r = a | b;
        ALU_NOR: r = ~(a | b);
        ALU_SLL: r = b << a[4:0];
        ALU_SRL: r = b >> a[4:0];
        default: r = 32'($signed(b) >>> a[4:0]);
      endcase
      tgt = idex.jump ? {idex.pc4[31:26], idex.jidx} : idex.pc4 + idex.imm;
      #1 check(ealu == r, "combinational ALU result");
      @(posedge clk); #1;
      check(exmem.alur == r && exmem.zero == (r == 0), "ALU result and zero");
      check(exmem.target == tgt, "target");
      check(exmem.db == idex.db && exmem.destr == idex.destr && exmem.tag == idex.tag, "carried data");
      check({exmem.wreg, exmem.m2reg, exmem.wmem, exmem.branch, exmem.bne, exmem.jump} ==
            {idex.wreg, idex.m2reg, idex.wmem, idex.branch, idex.bne, idex.jump}, "control bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
