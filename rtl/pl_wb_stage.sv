// pl_wb_stage: write-back stage of the pipelined CPU. A 2-to-1 multiplexer
// picks the memory data (Mem2Reg = 1) or the ALU result as the value written
// to the register file, which writes it on the falling edge of this cycle.
// The stage tag of the retiring instruction is registered once more as the
// "out" tag, so the display can show what has just left the pipeline.
module pl_wb_stage
  import cpu_pkg::*, pl_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  mem_wb_t     memwb,
  output logic        wb_we,
  output logic [4:0]  wb_destr,
  output logic [31:0] wb_data,
  output stage_tag_t  out_tag
);
  assign wb_we    = memwb.wreg;
  assign wb_destr = memwb.destr;
  assign wb_data  = memwb.m2reg ? memwb.mo : memwb.alur;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) out_tag <= TAG_NONE;
    else     out_tag <= memwb.tag;
  end
endmodule
