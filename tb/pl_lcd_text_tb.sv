// pl_lcd_text_tb: random pipeline state into the display formatter; the two
// lines must equal strings built here with $sformatf:
//   line 1 "IIIIIIII CC RRRR" (instruction, clock count, register),
//   line 2 "fNTdNTeNTmNTwNT " (stage name, number digit, type digit).
`timescale 1ns/1ps
module pl_lcd_text_tb;
  import cpu_pkg::*;
  logic [31:0] inst;
  logic [7:0] clk_count;
  logic [15:0] reg_data;
  stage_tag_t tags [5];
  logic [127:0] line1, line2;
  int checks = 0, failures = 0;

  pl_lcd_text dut (.inst, .clk_count, .reg_data, .tags, .line1, .line2);

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
    string e1, e2, names;
    names = "fdemw";
    for (int k = 0; k < 200; k++) begin
      inst = $urandom; clk_count = 8'($urandom); reg_data = 16'($urandom);
      foreach (tags[s]) tags[s] = '{itype: itype_e'($urandom), num: 8'($urandom)};
      #1;
      e1 = $sformatf("%08x %02x %04x", inst, clk_count, reg_data);
      e1 = e1.toupper();
      e2 = "";
      for (int s = 0; s < 5; s++)
        begin
          string h;
          h = $sformatf("%1x%1x", tags[s].num[3:0], tags[s].itype);
          e2 = {e2, names.substr(s, s), h.toupper()};
        end
      e2 = {e2, " "};
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
