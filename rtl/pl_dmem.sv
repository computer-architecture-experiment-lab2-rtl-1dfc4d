// pl_dmem: data memory of the pipelined CPU. A single-port 32-bit block
// memory on the falling clock edge: at the falling edge it writes din to
// addr when we is high, and registers the word at addr on dout (read-first:
// a write returns the old word). The MEM/WB register samples dout at the
// next rising edge. Word addressing; the low log2(DEPTH) bits of the address
// are used. Initial contents from INIT_FILE if not empty, else zero.
// Depth 512 is this design's choice (the document gives the width only).
module pl_dmem #(
  parameter int    DEPTH     = 512,
  parameter string INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [31:0]              din,
  output logic [31:0]              dout
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(negedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end
endmodule
