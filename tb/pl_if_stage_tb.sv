// pl_if_stage_tb: fetch stage with the demonstration program. Checks the
// reset PC (FFFFFFFF) and the first fetch of address 0, sequential fetch,
// the hold while a control transfer is in ID/EX/MEM (three NONE slots,
// PC frozen), and the redirect to the target (taken) or fall-through.
// The testbench plays the later stages: it raises ex_ctrl and mem_ctrl as
// the branch would move on, then presents taken/target as MEM/WB would.
`timescale 1ns/1ps
module pl_if_stage_tb;
  import cpu_pkg::*, pl_pkg::*;
  logic clk = 0, rst = 0;
  logic ex_ctrl = 0, mem_ctrl = 0, mem_taken = 0;
  logic [31:0] mem_target = 0, pc, npc;
  logic hold;
  stage_tag_t if_tag;
  if_id_t ifid;
  int checks = 0, failures = 0;
  logic [31:0] prog [10] = '{32'h8c010014, 32'h8c060015, 32'h00001820, 32'h00002020,
    32'h00002820, 32'h00411020, 32'h00611822, 32'h00812024, 32'h00a12827, 32'h1041fff8};

  pl_if_stage #(.IM_INIT("rtl/pl_prog.hex")) dut (.clk, .rst, .ex_ctrl, .mem_ctrl,
    .mem_taken, .mem_target, .pc, .npc, .hold, .if_tag, .ifid);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  task automatic branch_round(bit taken, logic [31:0] target, int exp_next);
    // ifid holds the branch now (in ID)
    check(hold && if_tag.itype == IT_NONE, "hold while branch in ID");
    @(posedge clk); #1; ex_ctrl = 1;
    check(ifid.inst == 0 && ifid.tag.itype == IT_NONE && pc == 9, "bubble 1, PC frozen");
    @(posedge clk); #1; ex_ctrl = 0; mem_ctrl = 1;
    check(ifid.inst == 0 && pc == 9, "bubble 2");
    @(posedge clk); #1; mem_ctrl = 0; mem_taken = taken; mem_target = target;
    check(ifid.inst == 0 && pc == 9, "bubble 3");
    #1 check(!hold && npc == (taken ? target : 32'd10), "npc while branch in WB");
    @(posedge clk); #1; mem_taken = 0;
    check(pc == 32'(exp_next) && ifid.inst == ((exp_next < 10) ? prog[exp_next] : 32'h0) && ifid.pc4 == 32'(exp_next + 1) &&
          ifid.tag.num == 8'(exp_next), "fetch after branch");
  endtask

  initial begin
    #1 rst = 1;
    #11;
    check(pc == 32'hFFFF_FFFF && ifid.inst == 0, "reset state");
    check(npc == 0, "npc after reset");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 10; i++) begin
      @(posedge clk); #1;
      check(pc == 32'(i) && ifid.inst == prog[i] && ifid.pc4 == 32'(i + 1) &&
            ifid.tag.num == 8'(i) && ifid.tag.itype == classify(prog[i]),
            $sformatf("sequential fetch %0d", i));
    end
    branch_round(1, 32'd2, 2);
    for (int i = 3; i < 10; i++) @(posedge clk);
    #1 check(pc == 9 && ifid.inst == prog[9], "second time at the branch");
    branch_round(0, 32'd2, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
