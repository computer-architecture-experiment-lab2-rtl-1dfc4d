// mc_reg_wrapper_tb: writes through the destination mux (rd or rt) and the
// data mux (DR or C) with random instructions and reads rs/rt back,
// comparing with a shadow register file; r0 stays zero.
`timescale 1ns/1ps
module mc_reg_wrapper_tb;
  logic clk = 0, rst = 0, memtoreg = 0, regdst = 0, write_reg = 0;
  logic [31:0] ir_data = 0, dr_data = 0, c_data = 0, rdata_a, rdata_b, dbg_data;
  logic [4:0] dbg_addr = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  mc_reg_wrapper dut (.clk, .rst, .ir_data, .dr_data, .c_data, .memtoreg, .regdst,
    .write_reg, .rdata_a, .rdata_b, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    logic [4:0] d;
    foreach (shadow[i]) shadow[i] = 0;
    #1 rst = 1; #1 rst = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      ir_data = $urandom; dr_data = $urandom; c_data = $urandom;
      memtoreg = 1'($urandom); regdst = 1'($urandom); write_reg = 1'($urandom);
      dbg_addr = 5'($urandom);
      #1 check(rdata_a == shadow[ir_data[25:21]] && rdata_b == shadow[ir_data[20:16]], "reads");
      check(dbg_data == shadow[dbg_addr], "debug read");
      d = regdst ? ir_data[15:11] : ir_data[20:16];
      @(posedge clk); #1;
      if (write_reg && d != 0) shadow[d] = memtoreg ? dr_data : c_data;
      check(rdata_b == shadow[ir_data[20:16]], "written value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
