// pl_dmem_tb: random writes and reads of the data memory against a shadow
// array; checks the falling-edge timing and the read-first behaviour (a
// write cycle returns the old word) and the initial words 20 and 21.
`timescale 1ns/1ps
module pl_dmem_tb;
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  logic [31:0] din = 0, dout;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  pl_dmem #(.DEPTH(64), .INIT_FILE("rtl/pl_data.hex")) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    shadow[20] = 32'hbeef0000; shadow[21] = 32'h0000beef;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk); #1;
      we = $urandom_range(0, 1); addr = 6'($urandom_range(16, 23)); din = $urandom;
      @(negedge clk); #1;
      check(dout == shadow[addr], $sformatf("read [%0d] got %h exp %h", addr, dout, shadow[addr]));
      if (we) shadow[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
