// pl_imem_tb: checks that the instruction memory holds the demonstration
// program loaded from its file, that it is read on the falling edge (the
// output changes there and not at the rising edge) and that the address
// wraps to the memory depth.
`timescale 1ns/1ps
module pl_imem_tb;
  logic clk = 0;
  logic [8:0] addr;
  logic [31:0] dout;
  int checks = 0, failures = 0;
  logic [31:0] prog [10] = '{32'h8c010014, 32'h8c060015, 32'h00001820, 32'h00002020,
    32'h00002820, 32'h00411020, 32'h00611822, 32'h00812024, 32'h00a12827, 32'h1041fff8};

  pl_imem #(.DEPTH(512), .INIT_FILE("rtl/pl_prog.hex")) dut (.clk, .addr, .dout);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 12; i++) begin
      @(posedge clk); #1 addr = 9'(i);
      #1 check(i == 0 || dout == ((i <= 10) ? prog[i-1] : 32'h0), $sformatf("output held until falling edge (%0d: %h)", i, dout));
      @(negedge clk); #1;
      check(dout == ((i < 10) ? prog[i] : 32'h0), $sformatf("word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
