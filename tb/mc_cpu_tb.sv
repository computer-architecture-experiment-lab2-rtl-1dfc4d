// mc_cpu_tb: end-to-end test of the multiple-cycle CPU against the
// instruction-level reference model (isa_model, one memory).
// Test 1: the demonstration program (lw, lw, add, sub, and, nor, sw, j 0);
// the state sequence of each instruction must be the printed one
// (lw 0,1,3,5,9; R-type 0,1,2,8; sw 0,1,4,7; j 0,1).
// Test 2: a generated program with every instruction of the set, including
// taken and not-taken beq/bne, shifts, immediates, and a jump.
// Checked: every register write and every store equals the model's next
// one, in order; each instruction takes its number of cycles (2 j, 3
// branch, 4 R/I-type/sw, 5 lw); final register and memory values.
`timescale 1ns/1ps
module mc_cpu_tb;
  import isa_model::*;
  logic clk = 0, rst = 0;
  logic [31:0] dbg_data, pc, ir_data, raddr, waddr;
  logic [3:0] state_out, insn_type, insn_code, insn_stage;
  int checks = 0, failures = 0;
  int n_reg_writes = 0, n_stores = 0, n_insns = 0;

  mc_cpu dut (.clk, .rst, .dbg_addr(5'd6), .dbg_data, .pc, .ir_data, .raddr, .waddr,
    .state_out, .insn_type, .insn_code, .insn_stage);

  always #5 clk = ~clk;
  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  Model mdl;
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

  function automatic int cpi(logic [31:0] inst);
    case (inst[31:26])
      6'h02: return 2;
      6'h04, 6'h05: return 3;
      6'h23: return 5;
      6'h00, 6'h08, 6'h0c, 6'h0d, 6'h2b: return 4;
      default: return 2;
    endcase
  endfunction

  bit monitor_on = 0;
  int cyc_in_insn = 0;
  logic [3:0] seq [$];
  logic [3:0] demo_seq [$];
  bit record_demo = 0;

  always @(posedge clk) begin
    if (monitor_on) begin
      if (dut.write_reg) begin
        logic [4:0] d;
        d = dut.regdst ? ir_data[15:11] : ir_data[20:16];
        if (d != 0) begin
          n_reg_writes++;
          if (exp_rd.size() == 0) check(0, "register write beyond model");
          else begin
            check(d == exp_rd[0] && dut.x_reg_wrapper.u_rf.wdata == exp_rv[0],
                  $sformatf("reg write r%0d=%h expected r%0d=%h", d,
                            dut.x_reg_wrapper.u_rf.wdata, exp_rd[0], exp_rv[0]));
            void'(exp_rd.pop_front()); void'(exp_rv.pop_front());
          end
        end
      end
      if (dut.write_mem) begin
        n_stores++;
        if (exp_ma.size() == 0) check(0, "store beyond model");
        else begin
          check(int'(waddr) == exp_ma[0] && dut.b_data == exp_mv[0], "store");
          void'(exp_ma.pop_front()); void'(exp_mv.pop_front());
        end
      end
      // cycles per instruction: counted from IF to the next IF
      if (state_out == 4'h0 && cyc_in_insn > 0) begin
        check(cyc_in_insn == cpi(ir_data), $sformatf("instruction %h took %0d cycles",
              ir_data, cyc_in_insn));
        n_insns++;
        if (record_demo) foreach (seq[i]) demo_seq.push_back(seq[i]);
        seq.delete();
        cyc_in_insn = 0;
      end
      seq.push_back(state_out);
      cyc_in_insn++;
    end
  end

  task automatic do_reset();
    monitor_on = 0;
    // reset must span a falling edge: the memory then reads address 0
    @(posedge clk); #1 rst = 1;
    @(negedge clk); #1 rst = 0;
    cyc_in_insn = 0; seq.delete();
    monitor_on = 1;
  endtask

  logic [31:0] prog [$];
  logic [3:0] want [$];

  initial begin
    // ---------------- test 1: demonstration program ----------------
    mdl = new(512, 0);
    for (int i = 0; i < 512; i++) mdl.m[i] = dut.x_memory.mem[i];
    model_run(24);
    do_reset();
    record_demo = 1;
    // one pass: 5+5+4+4+4+4+4+2 = 32 cycles, run three passes
    repeat (96) @(posedge clk);
    #2;
    record_demo = 0;
    check(dut.x_reg_wrapper.u_rf.regs[3] == 32'hbeefbeef, "r3");
    check(dut.x_reg_wrapper.u_rf.regs[4] == 32'hbeee4111, "r4");
    check(dut.x_reg_wrapper.u_rf.regs[5] == (32'hbeefbeef & 32'hbeee4111), "r5");
    check(dut.x_memory.mem[22] == ~(32'hbeee4111 | (32'hbeefbeef & 32'hbeee4111)), "mem[22] = r6");
    check(dbg_data == dut.x_memory.mem[22], "debug port shows r6");
    want = '{0,1,3,5,9, 0,1,3,5,9, 0,1,2,8, 0,1,2,8, 0,1,2,8, 0,1,2,8, 0,1,4,7, 0,1};
    check(demo_seq.size() >= 32, "demo program ran one pass");
    for (int i = 0; i < 32 && i < demo_seq.size(); i++)
      check(demo_seq[i] == want[i], $sformatf("demo state %0d: %h expected %h", i, demo_seq[i], want[i]));
    check(exp_rd.size() <= 6, "demo writes consumed");

    // ---------------- test 2: all instructions ----------------
    prog = {};
    prog.push_back(enc_i(6'h23, 0, 1, 16'd40));    // lw  r1, 40(r0)
    prog.push_back(enc_i(6'h08, 0, 2, 16'hfff0));  // addi r2, r0, -16
    prog.push_back(enc_i(6'h0d, 0, 3, 16'h8421));  // ori r3, r0, 0x8421
    prog.push_back(enc_r(6'h25, 1, 3, 4));         // or  r4, r1, r3
    prog.push_back(enc_r(6'h00, 0, 2, 5, 5'd4));   // sll r5, r2, 4
    prog.push_back(enc_r(6'h02, 0, 2, 6, 5'd3));   // srl r6, r2, 3
    prog.push_back(enc_r(6'h03, 0, 2, 7, 5'd3));   // sra r7, r2, 3
    prog.push_back(enc_i(6'h0c, 1, 8, 16'hff00));  // andi r8, r1, 0xff00
    prog.push_back(enc_i(6'h2b, 0, 4, 16'd41));    // sw  r4, 41(r0)
    prog.push_back(enc_i(6'h05, 1, 3, 16'd1));     // bne r1, r3, +1 (taken)
    prog.push_back(enc_i(6'h08, 0, 13, 16'd1));    // addi r13 (skipped)
    prog.push_back(enc_i(6'h05, 1, 1, 16'd5));     // bne r1, r1 (not taken)
    prog.push_back(enc_i(6'h04, 1, 3, 16'd5));     // beq r1, r3 (not taken)
    prog.push_back(enc_i(6'h23, 0, 14, 16'd41));   // lw  r14, 41(r0)
    prog.push_back(enc_i(6'h04, 14, 4, 16'd1));    // beq r14, r4, +1 (taken)
    prog.push_back(enc_i(6'h08, 0, 16, 16'd9));    // addi r16 (skipped)
    prog.push_back(enc_j(26'd18));                 // j 18
    prog.push_back(enc_i(6'h08, 0, 16, 16'd9));    // addi r16 (skipped)
    prog.push_back(enc_i(6'h08, 14, 17, 16'd1));   // 18: addi r17, r14, 1
    prog.push_back(enc_i(6'h04, 0, 0, 16'hffff));  // beq r0, r0, -1 (spin)
    for (int i = 0; i < 512; i++) dut.x_memory.mem[i] = (i < prog.size()) ? prog[i] : 32'h0;
    dut.x_memory.mem[40] = 32'h1234_5678;
    exp_rd.delete(); exp_rv.delete(); exp_ma.delete(); exp_mv.delete();
    mdl = new(512, 0);
    for (int i = 0; i < 512; i++) mdl.m[i] = dut.x_memory.mem[i];
    model_run(30);
    do_reset();
    repeat (120) @(posedge clk);
    #2;
    check(dut.x_memory.mem[41] == 32'h1234_d679, "stored word");
    check(dut.x_reg_wrapper.u_rf.regs[17] == 32'h1234_d67a, "r17 after jump");
    check(dut.x_reg_wrapper.u_rf.regs[13] == 0 && dut.x_reg_wrapper.u_rf.regs[16] == 0,
          "skipped instructions wrote nothing");
    check(exp_rd.size() == 0, "all model register writes seen");
    $display("reg writes %0d, stores %0d, instructions %0d", n_reg_writes, n_stores, n_insns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
