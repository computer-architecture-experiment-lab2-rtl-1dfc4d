// mc_mem_tb: the dual-port memory with the demonstration program. Checks
// the loaded words, synchronous reads on port A, writes on port B with
// read-after-write output, and that port A sees a port B write from the
// next edge on.
`timescale 1ns/1ps
module mc_mem_tb;
  logic clk = 0, web = 0;
  logic [8:0] addra = 0, addrb = 0;
  logic [31:0] dinb = 0, douta, doutb;
  logic [31:0] shadow [512];
  int checks = 0, failures = 0;

  mc_mem #(.DEPTH(512), .INIT_FILE("rtl/mc_prog.hex")) dut (.clka(clk), .addra, .douta,
    .clkb(clk), .web, .addrb, .dinb, .doutb);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    shadow[0] = 32'h8c010014; shadow[2] = 32'h00221820; shadow[7] = 32'h08000000;
    shadow[20] = 32'hbeef0000; shadow[21] = 32'h0000beef;
    foreach (shadow[i]) if (i <= 21 && !(i inside {0, 2, 7, 20, 21})) shadow[i] = dut.mem[i];
    check(dut.mem[6] == 32'hac060016, "program word 6");
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      addra = 9'($urandom_range(0, 24)); addrb = 9'($urandom_range(0, 24));
      web = 1'($urandom); dinb = $urandom;
      @(posedge clk); #1;
      check(douta == shadow[addra], $sformatf("port A [%0d]", addra));
      check(doutb == (web ? dinb : shadow[addrb]), "port B read after write");
      if (web) shadow[addrb] = dinb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
