// mc_pcm: program counter of the multiple-cycle CPU with its PCSource
// multiplexer. On a rising edge with write_pc high the PC loads
//   PCSource 00: the ALU result (PC + 1 computed in IF),
//   PCSource 01: register C (branch target computed in ID),
//   PCSource 10: the jump target {PC[31:26], IR[25:0]}.
// Word addressing: the PC counts words, so the jump index is not shifted.
// Asynchronous active-high reset to address 0.
module mc_pcm (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] alu_out,
  input  logic [31:0] c_data,
  input  logic [31:0] ir_data,
  input  logic [1:0]  pcsource,
  input  logic        write_pc,
  output logic [31:0] pc
);
  logic [31:0] next_pc;

  always_comb begin
    case (pcsource)
      2'b01:   next_pc = c_data;
      2'b10:   next_pc = {pc[31:26], ir_data[25:0]};
      default: next_pc = alu_out;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           pc <= '0;
    else if (write_pc) pc <= next_pc;
  end
endmodule
