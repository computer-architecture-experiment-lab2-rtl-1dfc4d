// pl_id_stage_tb: fills registers through the write-back port (falling-edge
// write), then feeds random instructions of the set into IF/ID and checks
// the ID/EX register one rising edge later: register operands, extended
// immediate, shift amount, destination, control bits and the carried tag.
// Also checks that a value written back in a cycle is read by the
// instruction decoded in that same cycle.
`timescale 1ns/1ps
module pl_id_stage_tb;
  import cpu_pkg::*, pl_pkg::*;
  logic clk = 0, rst = 0;
  if_id_t ifid;
  logic wb_we = 0;
  logic [4:0] wb_destr = 0;
  logic [31:0] wb_data = 0, dbg_data;
  id_ex_t idex;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;
  logic [5:0] ops [9] = '{6'h00, 6'h08, 6'h0c, 6'h0d, 6'h23, 6'h2b, 6'h04, 6'h05, 6'h02};
  logic [5:0] fns [8] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h27, 6'h00, 6'h02, 6'h03};

  pl_id_stage dut (.clk, .rst, .ifid, .wb_we, .wb_destr, .wb_data, .dbg_addr(5'd3),
    .dbg_data, .idex);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    logic [31:0] inst; logic [5:0] op, fn; logic [4:0] rs, rt, rd, wr_now;
    logic [31:0] wv_now;
    bit sext, regrt;
    ifid = IF_ID_NOP;
    #1 rst = 1;
    foreach (shadow[i]) shadow[i] = 0;
    @(negedge clk); rst = 0;
    for (int k = 0; k < 300; k++) begin
      // inputs change after the rising edge
      @(posedge clk); #1;
      op = ops[$urandom_range(0, 8)]; fn = fns[$urandom_range(0, 7)];
      inst = {op, 5'($urandom), 5'($urandom), 5'($urandom), 5'($urandom), fn};
      if (op != 6'h00) inst[5:0] = 6'($urandom);
      ifid = '{inst: inst, pc4: $urandom, tag: '{itype: classify(inst), num: 8'(k)}};
      wb_we = 1; wr_now = 5'($urandom); wv_now = $urandom;
      if ($urandom_range(0, 3) == 0) wr_now = inst[25:21];   // same-cycle read of a write
      wb_destr = wr_now; wb_data = wv_now;
      @(negedge clk); #1;
      if (wr_now != 0) shadow[wr_now] = wv_now;
      @(posedge clk); #1;
      rs = inst[25:21]; rt = inst[20:16]; rd = inst[15:11];
      sext  = op inside {6'h08, 6'h23, 6'h2b, 6'h04, 6'h05};
      regrt = op inside {6'h08, 6'h0c, 6'h0d, 6'h23};
      check(idex.da == shadow[rs] && idex.db == shadow[rt], "register operands");
      check(idex.imm == (sext ? {{16{inst[15]}}, inst[15:0]} : {16'h0, inst[15:0]}), "immediate");
      check(idex.sa == inst[10:6] && idex.jidx == inst[25:0] && idex.pc4 == ifid.pc4, "fields");
      check(idex.destr == (regrt ? rt : rd), "destination");
      check(idex.wreg == (op inside {6'h00, 6'h08, 6'h0c, 6'h0d, 6'h23}), "wreg");
      check(idex.m2reg == (op == 6'h23) && idex.wmem == (op == 6'h2b), "memory controls");
      check(idex.branch == (op inside {6'h04, 6'h05}) && idex.jump == (op == 6'h02), "branch/jump");
      check(idex.aluimm == (op inside {6'h08, 6'h0c, 6'h0d, 6'h23, 6'h2b}), "aluimm");
      check(idex.shift == (op == 6'h00 && fn inside {6'h00, 6'h02, 6'h03}), "shift");
      check(idex.tag == ifid.tag, "tag");
      check(dbg_data == shadow[3], $sformatf("debug read %h exp %h", dbg_data, shadow[3]));
      wb_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
