// anti_jitter_tb: a debouncer with CYCLES = 20. Bursts of bounce shorter
// than 20 clocks must not change the output; a level held steady must
// appear on the output exactly CYCLES + 2 clocks after it settled (two
// synchroniser clocks plus the count).
`timescale 1ns/1ps
module anti_jitter_tb;
  localparam int N = 20;
  logic clk = 0, btn_in = 0, btn_out;
  int checks = 0, failures = 0;

  anti_jitter #(.CYCLES(N)) dut (.clk, .btn_in, .btn_out);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  task automatic settle_to(bit v);
    int n;
    // bounce: random toggles, each run shorter than N
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) btn_in = ~btn_in;
      repeat ($urandom_range(1, N - 5)) begin
        @(posedge clk); #1 check(btn_out == !v, "output moved during bounce");
      end
    end
    @(negedge clk) btn_in = v;
    n = 0;
    while (btn_out != v && n < 3 * N) begin @(posedge clk); #1 n++; end
    check(n == N + 2, $sformatf("settled after %0d clocks, expected %0d", n, N + 2));
  endtask

  initial begin
    // power-up: hold low until the output is low
    repeat (3 * N) @(posedge clk);
    #1 check(btn_out == 0, "output low after power-up");
    for (int k = 0; k < 10; k++) begin
      settle_to(1);
      repeat (5) @(posedge clk);
      settle_to(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
