// pl_mem_stage_tb: stores and loads through the memory stage against a
// shadow memory, and the branch decision (beq, bne, j, none) for both zero
// values; MEM/WB must hold the loaded word, the ALU result, destination,
// write flags, taken and target one rising edge after the inputs.
`timescale 1ns/1ps
module pl_mem_stage_tb;
  import cpu_pkg::*, pl_pkg::*;
  logic clk = 0, rst = 0;
  ex_mem_t exmem;
  mem_wb_t memwb;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  pl_mem_stage #(.DM_DEPTH(64), .DM_INIT("rtl/pl_data.hex")) dut (.clk, .rst, .exmem, .memwb);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    logic [31:0] old; bit tk;
    foreach (shadow[i]) shadow[i] = 0;
    shadow[20] = 32'hbeef0000; shadow[21] = 32'h0000beef;
    exmem = '0;
    #1 rst = 1; #3 rst = 0;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk); #1;
      exmem = '{wreg: 1'($urandom), m2reg: 1'($urandom), wmem: 1'($urandom),
                branch: 1'($urandom), bne: 1'($urandom), jump: 1'($urandom_range(0, 3) == 0),
                zero: 1'($urandom), alur: 32'($urandom_range(16, 23)), db: $urandom,
                target: $urandom, destr: 5'($urandom),
                tag: '{itype: itype_e'($urandom), num: 8'($urandom)}};
      old = shadow[exmem.alur];
      tk = exmem.jump | (exmem.branch & (exmem.bne ? !exmem.zero : exmem.zero));
      @(posedge clk); #1;
      if (exmem.wmem) shadow[exmem.alur] = exmem.db;
      check(memwb.mo == old, $sformatf("memory word [%0d]", exmem.alur));
      check(memwb.alur == exmem.alur && memwb.destr == exmem.destr && memwb.tag == exmem.tag &&
            memwb.wreg == exmem.wreg && memwb.m2reg == exmem.m2reg, "carried fields");
      check(memwb.taken == tk && memwb.target == exmem.target, "branch decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
