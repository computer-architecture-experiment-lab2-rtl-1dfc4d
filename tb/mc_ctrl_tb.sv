// mc_ctrl_tb: runs the controller through one instruction of each class
// and checks the state sequence (the printed ones: lw 0,1,3,5,9; R-type
// 0,1,2,8; sw 0,1,4,7; j 0,1; and beq/bne 0,1,6 and addi/andi/ori
// 0,1,A,B added here), the main enables in each state, the branch write
// condition, and the type/code/stage display values.
`timescale 1ns/1ps
module mc_ctrl_tb;
  logic clk = 0, rst = 0, zero = 0;
  logic [31:0] ir_data = 0;
  logic write_pc, iord, write_mem, write_dr, write_ir, memtoreg, regdst, write_c;
  logic alu_srca, write_a, write_b, write_reg;
  logic [1:0] pcsource, alu_ctrl, alu_srcb;
  logic [3:0] state_out, insn_type, insn_code, insn_stage;
  int checks = 0, failures = 0;

  mc_ctrl dut (.clk, .rst, .ir_data, .zero, .write_pc, .iord, .write_mem, .write_dr,
    .write_ir, .memtoreg, .regdst, .pcsource, .write_c, .alu_ctrl, .alu_srca, .alu_srcb,
    .write_a, .write_b, .write_reg, .state_out, .insn_type, .insn_code, .insn_stage);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  function automatic int stage_of(logic [3:0] s);
    case (s)
      4'h0: return 1;
      4'h1: return 2;
      4'h2, 4'h3, 4'h4, 4'h6, 4'hA: return 3;
      4'h5, 4'h7: return 4;
      default: return 5;
    endcase
  endfunction

  // run one instruction from IF until back in IF; compare state sequence
  task automatic run(logic [31:0] inst, logic [3:0] seq [$], int typ, int code, bit z, string n);
    int i;
    #1 rst = 1; #1 rst = 0;
    ir_data = inst; zero = z;
    i = 0;
    do begin
      #1;
      check(i < seq.size() && state_out == seq[i], $sformatf("%s step %0d state %h", n, i, state_out));
      check(insn_stage == 4'(stage_of(state_out)), "stage code");
      check(insn_type == 4'(typ) && insn_code == 4'(code), $sformatf("%s type/code", n));
      case (state_out)
        4'h0: check(write_ir && write_pc && !iord && alu_srcb == 2'b01 && pcsource == 0, "IF enables");
        4'h1: check(write_a && write_b && write_c && alu_srcb == 2'b11 &&
                    write_pc == (inst[31:26] == 6'h02) && (write_pc -> pcsource == 2'b10), "ID enables");
        4'h2: check(write_c && alu_srca && alu_ctrl == 2'b10 && alu_srcb == 0, "EX_R enables");
        4'h3, 4'h4: check(write_c && alu_srca && alu_srcb == 2'b10 && alu_ctrl == 0, "EX address");
        4'h5: check(iord && write_dr && !write_mem, "MEM_RD enables");
        4'h7: check(iord && write_mem && !write_dr, "MEM_ST enables");
        4'h6: check(alu_ctrl == 2'b01 && pcsource == 2'b01 &&
                    write_pc == ((inst[31:26] == 6'h05) ? !z : z), "EX_BR enables");
        4'h8: check(write_reg && regdst && !memtoreg, "WB_R enables");
        4'h9: check(write_reg && !regdst && memtoreg, "WB_LS enables");
        4'hA: check(write_c && alu_srca && alu_srcb == 2'b10, "EX_I enables");
        4'hB: check(write_reg && !regdst && !memtoreg, "WB_I enables");
        default: check(0, "unexpected state");
      endcase
      if (!(state_out inside {4'h5, 4'h7})) check(!write_mem && !write_dr, "no memory access");
      @(posedge clk); #1;
      i++;
    end while (state_out != 4'h0 && i < 10);
    check(i == seq.size(), $sformatf("%s took %0d states", n, i));
  endtask

  initial begin
    run(32'h8c010014, '{4'h0, 4'h1, 4'h3, 4'h5, 4'h9}, 3, 1, 0, "lw");
    run(32'h00221820, '{4'h0, 4'h1, 4'h2, 4'h8}, 1, 3, 0, "add");
    run(32'h00222022, '{4'h0, 4'h1, 4'h2, 4'h8}, 1, 4, 0, "sub");
    run(32'h00642824, '{4'h0, 4'h1, 4'h2, 4'h8}, 1, 5, 0, "and");
    run(32'h00853027, '{4'h0, 4'h1, 4'h2, 4'h8}, 1, 6, 0, "nor");
    run(32'hac060016, '{4'h0, 4'h1, 4'h4, 4'h7}, 3, 2, 0, "sw");
    run(32'h08000000, '{4'h0, 4'h1}, 2, 7, 0, "j");
    run(32'h10220003, '{4'h0, 4'h1, 4'h6}, 3, 15, 1, "beq taken");
    run(32'h10220003, '{4'h0, 4'h1, 4'h6}, 3, 15, 0, "beq not taken");
    run(32'h14220003, '{4'h0, 4'h1, 4'h6}, 3, 15, 0, "bne taken");
    run(32'h20220005, '{4'h0, 4'h1, 4'hA, 4'hB}, 3, 12, 0, "addi");
    run(32'h34220005, '{4'h0, 4'h1, 4'hA, 4'hB}, 3, 14, 0, "ori");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
