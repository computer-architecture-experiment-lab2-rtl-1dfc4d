// pl_lcd_text: the two 16-character lines the pipelined CPU shows on the
// board's character LCD (combinational). Character i of a line is byte
// [127-8i -: 8] of the packed line (character 0 leftmost), in ASCII.
//   line 1: chars 0-7 the instruction in ID (8 hex digits), 8 space,
//           9-10 the clock count (low byte, hex), 11 space,
//           12-15 the selected register (low 16 bits, hex)
//   line 2: for the stages IF, ID, EX, MEM, WB in turn three characters:
//           the stage name (f, d, e, m, w), the instruction number (low
//           hex digit of its word address) and its type (hex); char 15 space
// The field layout follows the document; which instruction fills line 1 and
// the use of the low digits are this design's choices.
module pl_lcd_text
  import cpu_pkg::*;
(
  input  logic [31:0]  inst,
  input  logic [7:0]   clk_count,
  input  logic [15:0]  reg_data,
  input  stage_tag_t   tags [5],     // IF, ID, EX, MEM, WB
  output logic [127:0] line1,
  output logic [127:0] line2
);
  localparam logic [7:0] SP = 8'h20;
  localparam logic [7:0] NAMES [5] = '{8'h66, 8'h64, 8'h65, 8'h6D, 8'h77}; // f d e m w

  always_comb begin
    for (int i = 0; i < 8; i++) line1[127-8*i -: 8] = hex_char(inst[31-4*i -: 4]);
    line1[127-8*8  -: 8] = SP;
    line1[127-8*9  -: 8] = hex_char(clk_count[7:4]);
    line1[127-8*10 -: 8] = hex_char(clk_count[3:0]);
    line1[127-8*11 -: 8] = SP;
    for (int i = 0; i < 4; i++) line1[127-8*(12+i) -: 8] = hex_char(reg_data[15-4*i -: 4]);

    for (int s = 0; s < 5; s++) begin
      line2[127-8*(3*s)   -: 8] = NAMES[s];
      line2[127-8*(3*s+1) -: 8] = hex_char(tags[s].num[3:0]);
      line2[127-8*(3*s+2) -: 8] = hex_char(tags[s].itype);
    end
    line2[7:0] = SP;
  end
endmodule
