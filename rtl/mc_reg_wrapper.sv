// mc_reg_wrapper: register file of the multiple-cycle CPU with its two
// input multiplexers. RegDst picks the write register (1 = rd, 0 = rt);
// MemToReg picks the write data (1 = data register DR, 0 = ALU output
// register C). Reads of rs and rt are combinational; the write happens on
// the rising edge when write_reg is high. dbg_addr/dbg_data read one
// register for the display.
module mc_reg_wrapper (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ir_data,
  input  logic [31:0] dr_data,
  input  logic [31:0] c_data,
  input  logic        memtoreg,
  input  logic        regdst,
  input  logic        write_reg,
  output logic [31:0] rdata_a,
  output logic [31:0] rdata_b,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data
);
  regfile #(.NEG_EDGE_WRITE(1'b0)) u_rf (
    .clk, .rst,
    .raddr1 (ir_data[25:21]), .rdata1 (rdata_a),
    .raddr2 (ir_data[20:16]), .rdata2 (rdata_b),
    .we     (write_reg),
    .waddr  (regdst ? ir_data[15:11] : ir_data[20:16]),
    .wdata  (memtoreg ? dr_data : c_data),
    .dbg_addr, .dbg_data
  );
endmodule
