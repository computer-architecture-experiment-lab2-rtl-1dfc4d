// mc_lcd_text_tb: random multiple-cycle CPU state into the display
// formatter; the lines must equal strings built here:
//   line 1 "IIIIIIII RR WW  " (instruction, read and write addresses),
//   line 2 "S T C G PP RRRR " (state, type, code, stage, PC, register).
`timescale 1ns/1ps
module mc_lcd_text_tb;
  logic [31:0] ir;
  logic [7:0] raddr, waddr, pc;
  logic [3:0] state, itype, code, stage;
  logic [15:0] reg_data;
  logic [127:0] line1, line2;
  int checks = 0, failures = 0;

  mc_lcd_text dut (.ir, .raddr, .waddr, .state, .itype, .code, .stage, .pc, .reg_data,
    .line1, .line2);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [127:0] pack(string s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  initial begin
    string e1, e2;
    for (int k = 0; k < 200; k++) begin
      ir = $urandom; raddr = 8'($urandom); waddr = 8'($urandom); pc = 8'($urandom);
      state = 4'($urandom); itype = 4'($urandom); code = 4'($urandom); stage = 4'($urandom);
      reg_data = 16'($urandom);
      #1;
      e1 = $sformatf("%08x %02x %02x  ", ir, raddr, waddr);
      e2 = $sformatf("%1x %1x %1x %1x %02x %04x ", state, itype, code, stage, pc, reg_data);
      e1 = e1.toupper(); e2 = e2.toupper();
      checks++;
      if (line1 != pack(e1) || line2 != pack(e2)) begin
        failures++;
        $display("FAIL expected '%s' / '%s'", e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
