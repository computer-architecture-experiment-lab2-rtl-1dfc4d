// pl_wb_stage_tb: random MEM/WB contents; checks the write-back select
// (memory word for loads, ALU result otherwise), the write enable and
// destination, and the out-tag register one edge later.
`timescale 1ns/1ps
module pl_wb_stage_tb;
  import cpu_pkg::*, pl_pkg::*;
  logic clk = 0, rst = 0;
  mem_wb_t memwb;
  logic wb_we;
  logic [4:0] wb_destr;
  logic [31:0] wb_data;
  stage_tag_t out_tag;
  int checks = 0, failures = 0;

  pl_wb_stage dut (.clk, .rst, .memwb, .wb_we, .wb_destr, .wb_data, .out_tag);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    memwb = '0;
    #1 rst = 1; #3 rst = 0;
    check(out_tag == TAG_NONE, "reset tag");
    for (int k = 0; k < 300; k++) begin
      @(posedge clk); #1;
      memwb = '{wreg: 1'($urandom), m2reg: 1'($urandom), mo: $urandom, alur: $urandom,
                destr: 5'($urandom), taken: 1'($urandom), target: $urandom,
                tag: '{itype: itype_e'($urandom), num: 8'($urandom)}};
      #1 check(wb_data == (memwb.m2reg ? memwb.mo : memwb.alur), "write-back data");
      check(wb_we == memwb.wreg && wb_destr == memwb.destr, "write enable, destination");
      @(posedge clk); #1 check(out_tag == memwb.tag, "out tag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
