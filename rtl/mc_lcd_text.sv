// mc_lcd_text: the two 16-character lines the multiple-cycle CPU shows on
// the board's character LCD (combinational). Character i of a line is byte
// [127-8i -: 8] of the packed line (character 0 leftmost), in ASCII.
//   line 1: chars 0-7 the instruction register (hex), 8 space,
//           9-10 the memory read address, 11 space, 12-13 the memory write
//           address (low bytes, hex), 14-15 space
//   line 2: chars 0/2/4/6 state, type, code, stage (one hex digit each,
//           spaces between), 8-9 the PC (low byte), 10 space,
//           11-14 the selected register (low 16 bits), 15 space
// The field positions are the document's; what fills the unlisted
// positions (spaces) is this design's choice.
module mc_lcd_text
  import cpu_pkg::*;
(
  input  logic [31:0]  ir,
  input  logic [7:0]   raddr,
  input  logic [7:0]   waddr,
  input  logic [3:0]   state,
  input  logic [3:0]   itype,
  input  logic [3:0]   code,
  input  logic [3:0]   stage,
  input  logic [7:0]   pc,
  input  logic [15:0]  reg_data,
  output logic [127:0] line1,
  output logic [127:0] line2
);
  localparam logic [7:0] SP = 8'h20;

  always_comb begin
    line1 = {16{SP}};
    line2 = {16{SP}};
    for (int i = 0; i < 8; i++) line1[127-8*i -: 8] = hex_char(ir[31-4*i -: 4]);
    line1[127-8*9  -: 8] = hex_char(raddr[7:4]);
    line1[127-8*10 -: 8] = hex_char(raddr[3:0]);
    line1[127-8*12 -: 8] = hex_char(waddr[7:4]);
    line1[127-8*13 -: 8] = hex_char(waddr[3:0]);

    line2[127-8*0 -: 8] = hex_char(state);
    line2[127-8*2 -: 8] = hex_char(itype);
    line2[127-8*4 -: 8] = hex_char(code);
    line2[127-8*6 -: 8] = hex_char(stage);
    line2[127-8*8 -: 8] = hex_char(pc[7:4]);
    line2[127-8*9 -: 8] = hex_char(pc[3:0]);
    for (int i = 0; i < 4; i++) line2[127-8*(11+i) -: 8] = hex_char(reg_data[15-4*i -: 4]);
  end
endmodule
