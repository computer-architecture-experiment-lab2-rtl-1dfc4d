// mc_pcm_tb: the PC register and its source mux: reset to 0, hold when
// write_pc is low, and load the ALU result, C or the jump target
// {PC[31:26], IR[25:0]} as PCSource says.
`timescale 1ns/1ps
module mc_pcm_tb;
  logic clk = 0, rst = 0, write_pc = 0;
  logic [31:0] alu_out = 0, c_data = 0, ir_data = 0, pc, exp;
  logic [1:0] pcsource = 0;
  int checks = 0, failures = 0;

  mc_pcm dut (.clk, .rst, .alu_out, .c_data, .ir_data, .pcsource, .write_pc, .pc);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    #1 rst = 1; #1 rst = 0;
    check(pc == 0, "reset");
    exp = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      alu_out = $urandom; c_data = $urandom; ir_data = $urandom;
      pcsource = 2'($urandom_range(0, 2)); write_pc = 1'($urandom);
      if (write_pc)
        exp = (pcsource == 0) ? alu_out : (pcsource == 1) ? c_data : {exp[31:26], ir_data[25:0]};
      @(posedge clk); #1;
      check(pc == exp, $sformatf("pc %h exp %h", pc, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
