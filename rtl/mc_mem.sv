// mc_mem: unified instruction and data memory of the multiple-cycle CPU.
// A dual-port 32-bit block memory of DEPTH words with rising-edge ports:
// port A is read-only (douta registers mem[addra] each clka edge); port B
// reads and writes (on a clkb edge with web high, mem[addrb] takes dinb and
// doutb shows the new word: read-after-write). If both ports touch the same
// word in the same edge, port A returns the old word. Initial contents from
// INIT_FILE (hex words) when it is not empty.
// Width 32, depth 512, port roles and write mode follow the document.
module mc_mem #(
  parameter int    DEPTH     = 512,
  parameter string INIT_FILE = ""
) (
  input  logic                     clka,
  input  logic [$clog2(DEPTH)-1:0] addra,
  output logic [31:0]              douta,
  input  logic                     clkb,
  input  logic                     web,
  input  logic [$clog2(DEPTH)-1:0] addrb,
  input  logic [31:0]              dinb,
  output logic [31:0]              doutb
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clka) douta <= mem[addra];

  always_ff @(posedge clkb) begin
    if (web) begin
      mem[addrb] <= dinb;
      doutb      <= dinb;
    end else begin
      doutb      <= mem[addrb];
    end
  end
endmodule
