// pl_imem: instruction memory of the pipelined CPU. A single-port, read-only
// 32-bit block memory read on the falling clock edge: the word at addr is
// registered on dout at the falling edge, half a cycle before the IF/ID
// register samples it on the rising edge. The address is a word address;
// only its low log2(DEPTH) bits are used. The contents come from INIT_FILE
// (hexadecimal, one word per line) if that is not empty, else all zero.
// Depth 512 is this design's choice (the document gives the width only).
module pl_imem #(
  parameter int    DEPTH     = 512,
  parameter string INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [31:0]              dout
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(negedge clk) dout <= mem[addr];
endmodule
