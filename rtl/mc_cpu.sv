// mc_cpu: multiple-cycle CPU for the same MIPS subset as the pipelined CPU,
// built around one memory for instructions and data.
//
// Datapath registers PC, IR (instruction), DR (memory data), A and B
// (register file outputs) and C (ALU output), each with its own write enable
// from the controller (mc_ctrl). The memory address is PC or C (IorD); the
// register file is written from C or DR (MemToReg) at rd or rt (RegDst);
// the ALU takes PC or A, and B, one, or the immediate; the PC loads the ALU
// result, C, or the jump target (PCSource). Word addressing throughout.
//
// Timing: every register moves on the rising edge, one controller state per
// cycle. The memory (mc_mem, a rising-edge block memory) is clocked with the
// inverted CPU clock, so an address set up at the start of a state is read
// or written in the middle of it and the data is ready for the state's
// closing edge. CPI: 2 (j), 3 (beq/bne), 4 (R-type, I-type ALU, sw), 5 (lw).
//
// Debug outputs: controller state and display codes, PC, IR, the memory
// read and write addresses, and one register chosen by dbg_addr.
module mc_cpu #(
  parameter int    MEM_DEPTH = 512,
  parameter string MEM_INIT  = "rtl/mc_prog.hex"
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data,
  output logic [31:0] pc,
  output logic [31:0] ir_data,
  output logic [31:0] raddr,
  output logic [31:0] waddr,
  output logic [3:0]  state_out,
  output logic [3:0]  insn_type,
  output logic [3:0]  insn_code,
  output logic [3:0]  insn_stage
);
  localparam int AW = $clog2(MEM_DEPTH);

  logic        write_pc, iord, write_mem, write_dr, write_ir, memtoreg, regdst;
  logic        write_c, alu_srca, write_a, write_b, write_reg, zero;
  logic [1:0]  pcsource, alu_ctrl, alu_srcb;
  logic [31:0] mem_data, dr_data, a_data, b_data, c_data, alu_out;
  logic [31:0] rdata_a, rdata_b, doutb_unused;

  assign raddr = iord ? c_data : pc;
  assign waddr = c_data;

  mc_mem #(.DEPTH(MEM_DEPTH), .INIT_FILE(MEM_INIT)) x_memory (
    .clka  (~clk), .addra (raddr[AW-1:0]), .douta (mem_data),
    .clkb  (~clk), .web (write_mem), .addrb (waddr[AW-1:0]),
    .dinb  (b_data), .doutb (doutb_unused)
  );

  mc_ctrl x_ctrl (
    .clk, .rst, .ir_data, .zero,
    .write_pc, .iord, .write_mem, .write_dr, .write_ir, .memtoreg, .regdst,
    .pcsource, .write_c, .alu_ctrl, .alu_srca, .alu_srcb, .write_a, .write_b,
    .write_reg, .state_out, .insn_type, .insn_code, .insn_stage
  );

  mc_pcm x_pcm (
    .clk, .rst, .alu_out, .c_data, .ir_data, .pcsource, .write_pc, .pc
  );

  mc_alu_wrapper x_alu_wrapper (
    .a_data, .b_data, .ir_data, .pc, .alu_srca, .alu_srcb, .alu_ctrl,
    .zero, .alu_out
  );

  mc_reg_wrapper x_reg_wrapper (
    .clk, .rst, .ir_data, .dr_data, .c_data, .memtoreg, .regdst, .write_reg,
    .rdata_a, .rdata_b, .dbg_addr, .dbg_data
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ir_data <= '0;
      dr_data <= '0;
      a_data  <= '0;
      b_data  <= '0;
      c_data  <= '0;
    end else begin
      if (write_ir) ir_data <= mem_data;
      if (write_dr) dr_data <= mem_data;
      if (write_a)  a_data  <= rdata_a;
      if (write_b)  b_data  <= rdata_b;
      if (write_c)  c_data  <= alu_out;
    end
  end
endmodule
