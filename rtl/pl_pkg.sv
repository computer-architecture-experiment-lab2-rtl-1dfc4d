// pl_pkg: the contents of the four pipeline registers of the pipelined CPU
// (IF/ID, ID/EX, EX/MEM, MEM/WB). Field names follow the signal names of
// the document's stage schematic where it prints them (inst, pc4, imm,
// destr, alur, ...). Every register also carries the stage tag (type and
// number) shown on the board display.
package pl_pkg;
  import cpu_pkg::*;

  typedef struct packed {
    logic [31:0] inst;   // fetched instruction (0 for a bubble)
    logic [31:0] pc4;    // address of the next instruction (word address)
    stage_tag_t  tag;
  } if_id_t;

  typedef struct packed {
    logic        wreg;
    logic        m2reg;
    logic        wmem;
    logic        branch;
    logic        bne;
    logic        jump;
    alu_op_e     aluc;
    logic        aluimm;
    logic        shift;
    logic [31:0] da;      // register data 1 (rs)
    logic [31:0] db;      // register data 2 (rt)
    logic [31:0] imm;     // extended immediate
    logic [4:0]  sa;      // shift amount
    logic [25:0] jidx;    // jump target field
    logic [31:0] pc4;
    logic [4:0]  destr;   // destination register
    stage_tag_t  tag;
  } id_ex_t;

  typedef struct packed {
    logic        wreg;
    logic        m2reg;
    logic        wmem;
    logic        branch;
    logic        bne;
    logic        jump;
    logic        zero;
    logic [31:0] alur;    // ALU result (data address for lw/sw)
    logic [31:0] db;      // store data
    logic [31:0] target;  // branch or jump target
    logic [4:0]  destr;
    stage_tag_t  tag;
  } ex_mem_t;

  typedef struct packed {
    logic        wreg;
    logic        m2reg;
    logic [31:0] mo;      // data read from memory
    logic [31:0] alur;
    logic [4:0]  destr;
    logic        taken;   // control transfer taken (redirects the fetch)
    logic [31:0] target;
    stage_tag_t  tag;
  } mem_wb_t;

  localparam if_id_t IF_ID_NOP = '{inst: 32'h0, pc4: 32'h0, tag: TAG_NONE};
endpackage
