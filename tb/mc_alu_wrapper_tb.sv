// mc_alu_wrapper_tb: every select combination the controller uses, with
// random data: PC + 1, PC + branch offset, R-type operations from the
// function field (shifts take IR[10:6]), lw/sw/addi address and sum
// (sign-extended), andi/ori (zero-extended), and subtract for branches.
`timescale 1ns/1ps
module mc_alu_wrapper_tb;
  logic [31:0] a_data, b_data, ir_data, pc, alu_out, exp;
  logic alu_srca, zero;
  logic [1:0] alu_srcb, alu_ctrl;
  int checks = 0, failures = 0;
  logic [5:0] fns [8] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h27, 6'h00, 6'h02, 6'h03};

  mc_alu_wrapper dut (.a_data, .b_data, .ir_data, .pc, .alu_srca, .alu_srcb, .alu_ctrl,
    .zero, .alu_out);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s got %h exp %h", s, alu_out, exp); end
  endtask

  initial begin
    logic [31:0] sx, zx; logic [5:0] fn; logic [4:0] sa;
    for (int k = 0; k < 300; k++) begin
      a_data = $urandom; b_data = $urandom; ir_data = $urandom; pc = $urandom;
      if (k % 7 == 0) b_data = a_data;
      sx = {{16{ir_data[15]}}, ir_data[15:0]}; zx = {16'h0, ir_data[15:0]};
      // IF: PC + 1
      alu_srca = 0; alu_srcb = 2'b01; alu_ctrl = 2'b00; #1 exp = pc + 1; check(alu_out == exp, "pc+1");
      // ID: branch target
      alu_srcb = 2'b11; #1 exp = pc + sx; check(alu_out == exp, "branch target");
      // EX lw/sw/addi
      ir_data[31:26] = 6'h23; sx = {{16{ir_data[15]}}, ir_data[15:0]};
      alu_srca = 1; alu_srcb = 2'b10; #1 exp = a_data + sx; check(alu_out == exp, "address");
      // EX andi / ori
      ir_data[31:26] = 6'h0c; alu_ctrl = 2'b11; #1 exp = a_data & zx; check(alu_out == exp, "andi");
      ir_data[31:26] = 6'h0d; #1 exp = a_data | zx; check(alu_out == exp, "ori");
      // EX branch compare
      ir_data[31:26] = 6'h04; alu_srcb = 2'b00; alu_ctrl = 2'b01; #1 exp = a_data - b_data;
      check(alu_out == exp && zero == (a_data == b_data), "subtract/zero");
      // EX R-type
      ir_data[31:26] = 6'h00; fn = fns[k % 8]; ir_data[5:0] = fn; sa = ir_data[10:6];
      alu_ctrl = 2'b10;
      case (fn)
        6'h20: exp = a_data + b_data;
        6'h22: exp = a_data - b_data;
        6'h24: exp = a_data & b_data;
        6'h25: exp = a_data | b_data;
        6'h27: exp = ~(a_data | b_data);
        6'h00: exp = b_data << sa;
        6'h02: exp = b_data >> sa;
        default: exp = 32'($signed(b_data) >>> sa);
      endcase
      #1 check(alu_out == exp, $sformatf("R-type func %h", fn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
