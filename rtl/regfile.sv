// regfile: 32 x 32-bit register file with two combinational read ports,
// one write port and a third read port for the board display.
// Register 0 always reads zero and ignores writes. The write happens on the
// rising clock edge, or on the falling edge when NEG_EDGE_WRITE is set; the
// pipelined CPU sets it so that a value written back in the first half of a
// cycle is read by the instruction decoding in the second half (the
// document's "negative edge for write, low level for read").
// Reset (asynchronous, active high) clears all registers; that choice is
// this design's own.
module regfile #(
  parameter bit NEG_EDGE_WRITE = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  raddr1,
  output logic [31:0] rdata1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata2,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data
);
  logic [31:0] regs [32];

  if (NEG_EDGE_WRITE) begin : g_neg
    always_ff @(negedge clk or posedge rst) begin
      if (rst) begin
        for (int i = 0; i < 32; i++) regs[i] <= '0;
      end else if (we && waddr != 5'd0) begin
        regs[waddr] <= wdata;
      end
    end
  end else begin : g_pos
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        for (int i = 0; i < 32; i++) regs[i] <= '0;
      end else if (we && waddr != 5'd0) begin
        regs[waddr] <= wdata;
      end
    end
  end

  assign rdata1   = (raddr1 == 5'd0) ? 32'h0 : regs[raddr1];
  assign rdata2   = (raddr2 == 5'd0) ? 32'h0 : regs[raddr2];
  assign dbg_data = (dbg_addr == 5'd0) ? 32'h0 : regs[dbg_addr];
endmodule
