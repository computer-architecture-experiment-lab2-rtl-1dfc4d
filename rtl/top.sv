// top: board-level top with the two CPUs side by side, each with its own
// buttons, slide switches and display text.
//
// Each CPU is single-stepped: its clock is the debounced step button (west
// button) and its reset the debounced reset button (south button), both
// debounced with the board clock CCLK. Four slide switches choose which of
// registers 0-15 the display shows. The 2 x 16 characters each CPU would
// show on the board LCD come out as ASCII lines (character 0 in the top
// byte); the LCD controller that would drive the panel pins is not part of
// this RTL.
//   pl_*: five-stage pipelined CPU (pl_cpu) and its display (pl_lcd_text)
//   mc_*: multiple-cycle CPU (mc_cpu) and its display (mc_lcd_text)
// Memory contents are the two demonstration programs (rtl/*.hex).
module top
  import cpu_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000
) (
  input  logic         CCLK,
  input  logic         pl_btn_step,
  input  logic         pl_btn_reset,
  input  logic [3:0]   pl_sw,
  output logic [127:0] pl_line1,
  output logic [127:0] pl_line2,
  input  logic         mc_btn_step,
  input  logic         mc_btn_reset,
  input  logic [3:0]   mc_sw,
  output logic [127:0] mc_line1,
  output logic [127:0] mc_line2
);
  // ---------------- pipelined CPU ----------------
  logic        pl_clk, pl_rst;
  logic [31:0] pl_reg, pl_inst, pl_count;
  stage_tag_t  pl_tags [5];

  anti_jitter #(.CYCLES(DEBOUNCE_CYCLES)) u_pl_step (
    .clk(CCLK), .btn_in(pl_btn_step), .btn_out(pl_clk));
  anti_jitter #(.CYCLES(DEBOUNCE_CYCLES)) u_pl_rst (
    .clk(CCLK), .btn_in(pl_btn_reset), .btn_out(pl_rst));

  pl_cpu u_pl_cpu (
    .clk(pl_clk), .rst(pl_rst),
    .dbg_addr({1'b0, pl_sw}), .dbg_data(pl_reg),
    .pc(), .npc(), .id_inst(pl_inst), .ex_alu(),
    .clk_count(pl_count),
    .tag_if(pl_tags[0]), .tag_id(pl_tags[1]), .tag_ex(pl_tags[2]),
    .tag_mem(pl_tags[3]), .tag_wb(pl_tags[4]), .tag_out(),
    .fetch_hold()
  );

  pl_lcd_text u_pl_lcd (
    .inst(pl_inst), .clk_count(pl_count[7:0]), .reg_data(pl_reg[15:0]),
    .tags(pl_tags), .line1(pl_line1), .line2(pl_line2)
  );

  // ---------------- multiple-cycle CPU ----------------
  logic        mc_clk, mc_rst;
  logic [31:0] mc_reg, mc_pc, mc_ir, mc_raddr, mc_waddr;
  logic [3:0]  mc_state, mc_type, mc_code, mc_stage;

  anti_jitter #(.CYCLES(DEBOUNCE_CYCLES)) u_mc_step (
    .clk(CCLK), .btn_in(mc_btn_step), .btn_out(mc_clk));
  anti_jitter #(.CYCLES(DEBOUNCE_CYCLES)) u_mc_rst (
    .clk(CCLK), .btn_in(mc_btn_reset), .btn_out(mc_rst));

  mc_cpu u_mc_cpu (
    .clk(mc_clk), .rst(mc_rst),
    .dbg_addr({1'b0, mc_sw}), .dbg_data(mc_reg),
    .pc(mc_pc), .ir_data(mc_ir), .raddr(mc_raddr), .waddr(mc_waddr),
    .state_out(mc_state), .insn_type(mc_type), .insn_code(mc_code),
    .insn_stage(mc_stage)
  );

  mc_lcd_text u_mc_lcd (
    .ir(mc_ir), .raddr(mc_raddr[7:0]), .waddr(mc_waddr[7:0]),
    .state(mc_state), .itype(mc_type), .code(mc_code), .stage(mc_stage),
    .pc(mc_pc[7:0]), .reg_data(mc_reg[15:0]),
    .line1(mc_line1), .line2(mc_line2)
  );
endmodule
