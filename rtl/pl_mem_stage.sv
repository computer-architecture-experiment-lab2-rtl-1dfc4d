// pl_mem_stage: memory stage of the pipelined CPU with the data memory and
// the MEM/WB register. The data memory (pl_dmem) is read and written on the
// falling edge at address alur; a store writes db. The branch condition is
// formed here, as the AND of Branch and the ALU zero flag (inverted for
// bne), or unconditionally for j; taken and target travel in MEM/WB to the
// fetch stage, which redirects the PC one cycle later.
module pl_mem_stage
  import cpu_pkg::*, pl_pkg::*;
#(
  parameter int    DM_DEPTH = 512,
  parameter string DM_INIT  = ""
) (
  input  logic    clk,
  input  logic    rst,
  input  ex_mem_t exmem,
  output mem_wb_t memwb
);
  logic [31:0] mo;
  logic        taken;

  pl_dmem #(.DEPTH(DM_DEPTH), .INIT_FILE(DM_INIT)) u_dmem (
    .clk  (clk),
    .we   (exmem.wmem),
    .addr (exmem.alur[$clog2(DM_DEPTH)-1:0]),
    .din  (exmem.db),
    .dout (mo)
  );

  assign taken = exmem.jump | (exmem.branch & (exmem.zero ^ exmem.bne));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      memwb <= '0;
    end else begin
      memwb <= '{wreg: exmem.wreg, m2reg: exmem.m2reg, mo: mo,
                 alur: exmem.alur, destr: exmem.destr, taken: taken,
                 target: exmem.target, tag: exmem.tag};
    end
  end
endmodule
