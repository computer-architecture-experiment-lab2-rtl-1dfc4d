// pl_cpu_tb: end-to-end test of the pipelined CPU against the instruction
// level reference model (isa_model).
// Test 1 runs the demonstration program (loop of add/sub/and/nor closed by
// beq, data words 0xbeef0000 and 0x0000beef at addresses 20 and 21).
// Test 2 loads a generated program that uses every instruction (or, sll,
// srl, sra, addi, andi, ori, sw, lw, bne taken and not taken, beq, j) with
// dependent instructions kept three apart (no forwarding in the design).
// Checked every cycle: each register write in WB equals the model's next
// write, in order; each store equals the model's next store; the tags move
// one stage per cycle; every beq/bne/j in ID is followed by exactly three
// NONE bubbles; the first instruction reaches ID one cycle after reset.
`timescale 1ns/1ps
module pl_cpu_tb;
  import cpu_pkg::*;
  import isa_model::*;

  logic clk = 0, rst = 0;
  logic [31:0] dbg_data, pc, npc, id_inst, ex_alu, clk_count;
  stage_tag_t tag_if, tag_id, tag_ex, tag_mem, tag_wb, tag_out;
  logic fetch_hold;
  int checks = 0, failures = 0;
  int n_bubble_seq = 0, n_taken = 0, n_reg_writes = 0, n_stores = 0;

  pl_cpu dut (
    .clk, .rst, .dbg_addr(5'd0), .dbg_data, .pc, .npc, .id_inst, .ex_alu,
    .clk_count, .tag_if, .tag_id, .tag_ex, .tag_mem, .tag_wb, .tag_out,
    .fetch_hold
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  Model mdl;
  // expected register / memory writes, produced by the model ahead
  logic [4:0]  exp_rd [$];
  logic [31:0] exp_rv [$];
  int          exp_ma [$];
  logic [31:0] exp_mv [$];

  task automatic model_run(int n);
    bit rw, mw; logic [4:0] rd; logic [31:0] rv, mv; int ma; logic [31:0] w;
    for (int i = 0; i < n; i++) begin
      w = mdl.step(rw, rd, rv, mw, ma, mv);
      if (rw) begin exp_rd.push_back(rd); exp_rv.push_back(rv); end
      if (mw) begin exp_ma.push_back(ma); exp_mv.push_back(mv); end
    end
  endtask

  // history of ID tags for the bubble check
  stage_tag_t id_hist [$];
  stage_tag_t prev_id, prev_ex, prev_mem;
  bit monitor_on = 0;

  always @(posedge clk) begin
    if (monitor_on && !rst) begin
      // register write in WB (the register file writes on this cycle's falling edge)
      if (dut.wb_we && dut.wb_destr != 0) begin
        n_reg_writes++;
        if (exp_rd.size() == 0) check(0, "register write beyond model");
        else begin
          check(dut.wb_destr == exp_rd[0] && dut.wb_data == exp_rv[0],
                $sformatf("reg write r%0d=%h expected r%0d=%h", dut.wb_destr, dut.wb_data,
                          exp_rd[0], exp_rv[0]));
          void'(exp_rd.pop_front()); void'(exp_rv.pop_front());
        end
      end
      if (dut.exmem.wmem) begin
        n_stores++;
        if (exp_ma.size() == 0) check(0, "store beyond model");
        else begin
          check(int'(dut.exmem.alur) == exp_ma[0] && dut.exmem.db == exp_mv[0],
                $sformatf("store [%0d]=%h expected [%0d]=%h", dut.exmem.alur, dut.exmem.db,
                          exp_ma[0], exp_mv[0]));
          void'(exp_ma.pop_front()); void'(exp_mv.pop_front());
        end
      end
      if (dut.memwb.taken) n_taken++;
    end
  end

  // stage-to-stage tag movement and bubble count, sampled after each edge
  always @(posedge clk) begin
    #1;
    if (monitor_on && !rst) begin
      check(tag_ex == prev_id && tag_mem == prev_ex && tag_wb == prev_mem,
            "tags do not advance one stage per cycle");
      id_hist.push_back(tag_id);
      if (id_hist.size() >= 5) begin
        if (id_hist[0].itype inside {IT_BEQ, IT_BNE, IT_J}) begin
          check(id_hist[1].itype == IT_NONE && id_hist[2].itype == IT_NONE &&
                id_hist[3].itype == IT_NONE, "control transfer not followed by 3 NONE");
          n_bubble_seq++;
        end
        void'(id_hist.pop_front());
      end
    end
    prev_id = tag_id; prev_ex = tag_ex; prev_mem = tag_mem;
  end

  task automatic do_reset();
    monitor_on = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #2 rst = 0;
    id_hist.delete();
    prev_id = TAG_NONE; prev_ex = TAG_NONE; prev_mem = TAG_NONE;
    monitor_on = 1;
    @(posedge clk); #1;
    check(pc == 32'd0 && tag_id.num == 8'd0 && id_inst == dut.u_if.u_imem.mem[0],
          "first instruction not in ID one cycle after reset");
  endtask

  logic [31:0] prog [$];

  initial begin
    // ---------------- test 1: demonstration program ----------------
    mdl = new(512, 32'hFFFF_FFFF + 1, 1);
    for (int i = 0; i < 512; i++) begin
      mdl.m[i] = dut.u_if.u_imem.mem[i];
      mdl.d[i] = dut.u_mem.u_dmem.mem[i];
    end
    model_run(60);
    do_reset();
    repeat (60) @(posedge clk);
    #2;
    check(dut.u_id.u_rf.regs[1] == 32'hbeef0000, "r1 after demo");
    check(dut.u_id.u_rf.regs[6] == 32'h0000beef, "r6 after demo");
    check(dut.u_id.u_rf.regs[2] == 32'h7dde0000, "r2 after two loop passes");
    check(dut.u_id.u_rf.regs[3] == 32'h41110000, "r3 = 0 - r1");
    check(dut.u_id.u_rf.regs[5] == 32'h4110ffff, "r5 = ~r1");
    check(clk_count == 32'd61, "clock count");
    $display("demo: reg writes %0d, taken %0d, bubble sequences %0d", n_reg_writes, n_taken, n_bubble_seq);
    check(n_taken == 1, "demo program takes its beq exactly once");

    // ---------------- test 2: all instructions ----------------
    prog = {};
    prog.push_back(enc_i(6'h23, 0, 1, 16'd20));     // lw  r1, 20(r0)
    prog.push_back(enc_i(6'h08, 0, 2, 16'hfff0));   // addi r2, r0, -16
    prog.push_back(enc_i(6'h0d, 0, 3, 16'h8421));   // ori r3, r0, 0x8421
    prog.push_back(32'h0);
    prog.push_back(32'h0);
    prog.push_back(enc_r(6'h25, 1, 3, 4));          // or  r4, r1, r3
    prog.push_back(enc_r(6'h00, 0, 2, 5, 5'd4));    // sll r5, r2, 4
    prog.push_back(enc_r(6'h02, 0, 2, 6, 5'd3));    // srl r6, r2, 3
    prog.push_back(enc_r(6'h03, 0, 2, 7, 5'd3));    // sra r7, r2, 3
    prog.push_back(enc_i(6'h0c, 1, 8, 16'hff00));   // andi r8, r1, 0xff00
    prog.push_back(enc_r(6'h20, 1, 3, 9));          // add r9, r1, r3
    prog.push_back(enc_r(6'h22, 1, 3, 10));         // sub r10, r1, r3
    prog.push_back(enc_r(6'h27, 4, 2, 11));         // nor r11, r4, r2
    prog.push_back(enc_r(6'h24, 4, 3, 12));         // and r12, r4, r3
    prog.push_back(enc_i(6'h2b, 0, 4, 16'd30));     // sw  r4, 30(r0)
    prog.push_back(enc_i(6'h05, 1, 3, 16'd2));      // bne r1, r3, +2 (taken)
    prog.push_back(enc_i(6'h08, 0, 13, 16'd1));     // addi r13 (skipped)
    prog.push_back(enc_i(6'h08, 0, 13, 16'd2));     // addi r13 (skipped)
    prog.push_back(enc_i(6'h05, 1, 1, 16'd5));      // bne r1, r1 (not taken)
    prog.push_back(enc_i(6'h04, 1, 3, 16'd5));      // beq r1, r3 (not taken)
    prog.push_back(enc_i(6'h23, 0, 14, 16'd30));    // lw  r14, 30(r0)
    prog.push_back(enc_i(6'h08, 0, 15, 16'd7));     // addi r15, r0, 7
    prog.push_back(enc_j(26'd25));                  // j 25
    prog.push_back(enc_i(6'h08, 0, 16, 16'd9));     // addi r16 (skipped)
    prog.push_back(enc_i(6'h08, 0, 16, 16'd9));     // addi r16 (skipped)
    prog.push_back(enc_i(6'h08, 15, 17, 16'd1));    // 25: addi r17, r15, 1
    prog.push_back(enc_i(6'h04, 0, 0, 16'hffff));   // beq r0, r0, -1 (spin)
    for (int i = 0; i < 512; i++) begin
      dut.u_if.u_imem.mem[i] = (i < prog.size()) ? prog[i] : 32'h0;
      dut.u_mem.u_dmem.mem[i] = 32'h0;
    end
    dut.u_mem.u_dmem.mem[20] = 32'h1234_5678;
    exp_rd.delete(); exp_rv.delete(); exp_ma.delete(); exp_mv.delete();
    mdl = new(512, 0, 1);
    for (int i = 0; i < 512; i++) mdl.m[i] = (i < prog.size()) ? prog[i] : 32'h0;
    mdl.d[20] = 32'h1234_5678;
    model_run(40);
    n_taken = 0;
    do_reset();
    repeat (90) @(posedge clk);
    #2;
    check(dut.u_mem.u_dmem.mem[30] == (32'h1234_5678 | 32'h0000_8421), "stored word");
    check(dut.u_id.u_rf.regs[17] == 32'd8, "r17 after jump");
    check(dut.u_id.u_rf.regs[13] == 32'd0 && dut.u_id.u_rf.regs[16] == 32'd0,
          "skipped instructions wrote nothing");
    check(n_stores >= 1 && n_taken >= 3, "stores and taken transfers happened");
    $display("total: reg writes %0d, stores %0d, bubble sequences %0d", n_reg_writes, n_stores, n_bubble_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
