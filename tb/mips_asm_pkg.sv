// mips_asm_pkg: testbench helpers for the MIPS-lite CPU tests: an assembler
// for the six instructions (standard MIPS encodings, written out here
// independently of the RTL package) and a reference model that executes one
// instruction on a register array and a word memory.
package mips_asm_pkg;

  function automatic logic [31:0] enc_r(input int rs, input int rt, input int rd, input logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] a_addu(input int rd, input int rs, input int rt); return enc_r(rs, rt, rd, 6'h21); endfunction
  function automatic logic [31:0] a_subu(input int rd, input int rs, input int rt); return enc_r(rs, rt, rd, 6'h23); endfunction
  function automatic logic [31:0] a_ori (input int rt, input int rs, input int imm); return enc_i(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lw  (input int rt, input int rs, input int imm); return enc_i(6'h23, rs, rt, imm); endfunction
  function automatic logic [31:0] a_sw  (input int rt, input int rs, input int imm); return enc_i(6'h2b, rs, rt, imm); endfunction
  function automatic logic [31:0] a_beq (input int rs, input int rt, input int imm); return enc_i(6'h04, rs, rt, imm); endfunction

  // Word index of a byte address in a memory of `words` words (a power of two).
  function automatic int word_index(input logic [31:0] addr, input int words);
    logic [31:0] w;
    w = (addr >> 2) & (32'(words) - 1);
    return int'(w);
  endfunction

  // Effect of one instruction, as predicted by the reference model.
  typedef struct {
    logic        rf_we;
    logic [4:0]  rf_waddr;
    logic [31:0] rf_wdata;
    logic        dm_we;
    logic [31:0] dm_addr;
    logic [31:0] dm_wdata;
    logic [31:0] next_pc;
    bit          is_beq;
    bit          taken;
  } effect_t;

  // Executes instr at pc on regs/mem (mem has `words` words, indexed by
  // byte address / 4 modulo words) and returns what it changed.
  function automatic effect_t step(input logic [31:0] instr, input logic [31:0] pc,
                                   ref logic [31:0] regs [32], ref logic [31:0] mem [],
                                   input int words);
    effect_t e;
    logic [5:0]  op, fn;
    int          rs, rt, rd;
    logic [31:0] si, zi, a, b;
    int          idx;
    op = instr[31:26];
    fn = instr[5:0];
    rs = int'(instr[25:21]);
    rt = int'(instr[20:16]);
    rd = int'(instr[15:11]);
    si = {{16{instr[15]}}, instr[15:0]};
    zi = {16'h0, instr[15:0]};
    a  = regs[rs];
    b  = regs[rt];
    e = '{rf_we: 0, rf_waddr: '0, rf_wdata: '0, dm_we: 0, dm_addr: '0, dm_wdata: '0,
          next_pc: pc + 4, is_beq: 0, taken: 0};
    case (op)
      6'h00: if (fn == 6'h21 || fn == 6'h23) begin
        e.rf_we = 1; e.rf_waddr = 5'(rd); e.rf_wdata = (fn == 6'h21) ? a + b : a - b;
      end
      6'h0d: begin e.rf_we = 1; e.rf_waddr = 5'(rt); e.rf_wdata = a | zi; end
      6'h23: begin e.rf_we = 1; e.rf_waddr = 5'(rt); idx = word_index(a + si, words); e.rf_wdata = mem[idx]; end
      6'h2b: begin e.dm_we = 1; e.dm_addr = a + si; e.dm_wdata = b; end
      6'h04: begin
        e.is_beq = 1;
        e.taken  = (a == b);
        if (e.taken) e.next_pc = pc + 4 + (si << 2);
      end
      default: ;
    endcase
    if (e.rf_we && e.rf_waddr != 0) regs[e.rf_waddr] = e.rf_wdata;
    if (e.dm_we) begin idx = word_index(e.dm_addr, words); mem[idx] = e.dm_wdata; end
    return e;
  endfunction

endpackage
