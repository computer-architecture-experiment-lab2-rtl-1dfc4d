// isa_model: instruction-level reference model of the MIPS subset shared by
// both CPUs, for testbenches. It keeps its own registers and memory and
// executes one instruction per call of step(). Instruction and data memory
// are one array (m) or, for the pipelined CPU, two (m and d). Word addressing: the PC and
// memory addresses count words; branch target = PC + 1 + offset, jump
// target = {(PC+1)[31:26], index}. Each step reports the register write
// (if any, never to r0) and the memory write (if any).
package isa_model;

  class Model;
    logic [31:0] r [32];
    logic [31:0] m [];    // instruction memory (and data memory if unified)
    logic [31:0] d [];    // data memory when separate
    bit          split;
    logic [31:0] pc;
    int          depth;

    function new(int depth_words, logic [31:0] reset_pc, bit separate_data = 0);
      depth = depth_words;
      split = separate_data;
      m = new[depth];
      d = new[depth];
      foreach (m[i]) m[i] = '0;
      foreach (d[i]) d[i] = '0;
      foreach (r[i]) r[i] = '0;
      pc = reset_pc;
    endfunction

    // Execute one instruction. Returns its word; outputs describe writes.
    function logic [31:0] step(output bit rw, output logic [4:0] rd, output logic [31:0] rv,
                               output bit mw, output int ma, output logic [31:0] mv);
      logic [31:0] inst, a, b, sx, zx, res, pc1;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rdf, sa;
      inst = m[pc % depth];
      op = inst[31:26]; fn = inst[5:0];
      rs = inst[25:21]; rt = inst[20:16]; rdf = inst[15:11]; sa = inst[10:6];
      a = r[rs]; b = r[rt];
      sx = {{16{inst[15]}}, inst[15:0]};
      zx = {16'h0, inst[15:0]};
      pc1 = pc + 1;
      rw = 0; mw = 0; rd = 0; rv = 0; ma = 0; mv = 0; res = 0;
      case (op)
        6'h00: begin
          rw = 1; rd = rdf;
          case (fn)
            6'h20: res = a + b;
            6'h22: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h27: res = ~(a | b);
            6'h00: res = b << sa;
            6'h02: res = b >> sa;
            6'h03: res = $unsigned($signed(b) >>> sa);
            default: rw = 0;
          endcase
          rv = res;
        end
        6'h08: begin rw = 1; rd = rt; rv = a + sx; end
        6'h0c: begin rw = 1; rd = rt; rv = a & zx; end
        6'h0d: begin rw = 1; rd = rt; rv = a | zx; end
        6'h23: begin rw = 1; rd = rt; rv = split ? d[(a + sx) % depth] : m[(a + sx) % depth]; end
        6'h2b: begin mw = 1; ma = int'((a + sx) % depth); mv = b; end
        6'h04: if (a == b) pc1 = pc + 1 + sx;
        6'h05: if (a != b) pc1 = pc + 1 + sx;
        6'h02: pc1 = {pc1[31:26], inst[25:0]};
        default: ;
      endcase
      if (rd == 0) rw = 0;
      if (rw) r[rd] = rv;
      if (mw) begin if (split) d[ma] = mv; else m[ma] = mv; end
      pc = pc1;
      return inst;
    endfunction
  endclass

  // Instruction encoders
  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] rd, logic [4:0] sa = 0);
    return {6'h00, rs, rt, rd, sa, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                        logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] enc_j(logic [25:0] idx);
    return {6'h02, idx};
  endfunction

endpackage
