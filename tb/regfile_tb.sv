// regfile_tb: writes random values to random registers of a rising-edge
// and a falling-edge register file, reads them back on all three ports and
// checks that r0 stays zero, that reset clears, and that the falling-edge
// version has the value after the falling edge of the same cycle.
`timescale 1ns/1ps
module regfile_tb;
  logic clk = 0, rst = 0;
  logic [4:0] ra1, ra2, wa, da;
  logic [31:0] rd1p, rd2p, dbp, rd1n, rd2n, dbn, wd;
  logic we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile #(.NEG_EDGE_WRITE(1'b0)) dut_p (.clk, .rst, .raddr1(ra1), .rdata1(rd1p),
    .raddr2(ra2), .rdata2(rd2p), .we, .waddr(wa), .wdata(wd), .dbg_addr(da), .dbg_data(dbp));
  regfile #(.NEG_EDGE_WRITE(1'b1)) dut_n (.clk, .rst, .raddr1(ra1), .rdata1(rd1n),
    .raddr2(ra2), .rdata2(rd2n), .we, .waddr(wa), .wdata(wd), .dbg_addr(da), .dbg_data(dbn));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; da = 0;
    #1 rst = 1;
    #12 rst = 0;
    foreach (shadow[i]) shadow[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1;
      check(rd1p == 0 && rd1n == 0, "reset value");
    end
    for (int k = 0; k < 300; k++) begin
      @(posedge clk); #1;
      we = $urandom_range(0, 3) != 0;
      wa = 5'($urandom); wd = $urandom;
      ra1 = wa; ra2 = 5'($urandom); da = 5'($urandom);
      @(negedge clk); #1;
      // falling-edge file already holds the new value
      check(rd1n == ((we && wa != 0) ? wd : shadow[wa]), "neg-edge write visible in same cycle");
      check(rd1p == shadow[wa], "pos-edge file unchanged before rising edge");
      @(posedge clk); #1;
      if (we && wa != 0) shadow[wa] = wd;
      we = 0;
      check(rd1p == shadow[ra1] && rd1n == shadow[ra1], "port 1");
      check(rd2p == shadow[ra2] && rd2n == shadow[ra2], "port 2");
      check(dbp == shadow[da] && dbn == shadow[da], "debug port");
    end
    rst = 1; #1; rst = 0; ra1 = 5'd7; #1;
    check(rd1p == 0 && rd1n == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
