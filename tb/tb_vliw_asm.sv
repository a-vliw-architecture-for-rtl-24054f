// tb_vliw_asm: a small assembler for the processor testbenches.
// Instructions are built from their chunks and appended to `prog`, a list of
// 16-bit chunks starting at chunk address 0.  `ins` returns the chunk address
// of the instruction it appends, so backward branch targets are known; a
// forward target is filled in later with `patch`.
package tb_vliw_asm;
  import lns_pkg::*;

  logic [15:0] prog [$];

  function automatic logic [15:0] c3(bit l, bit m, bimm_e bi, alu_op_e op, int rd, int rs);
    return {l, m, bi, op, 4'(rd), 4'(rs)};
  endfunction

  function automatic logic [15:0] c2(lns_op_e op, bit w, int ra, int rb, int rc);
    return {op, w, 4'(ra), 4'(rb), 4'(rc)};
  endfunction

  function automatic logic [15:0] c1(bit d, bit l, int rt, int ri, int ro);
    return {2'b00, d, l, 4'(rt), 4'(ri), 4'(ro)};
  endfunction

  // append one instruction; the header says which other chunks are used
  function automatic int ins(logic [15:0] h, logic [15:0] lc = '0, logic [15:0] mc = '0,
                             word_t imm = '0);
    int at;
    at = prog.size();
    prog.push_back(h);
    if (h[15]) prog.push_back(lc);
    if (h[14]) prog.push_back(mc);
    if (h[13:12] != 2'b00) begin
      prog.push_back(imm[31:16]);
      prog.push_back(imm[15:0]);
    end
    return at;
  endfunction

  // set the 32-bit field of the instruction at chunk address `at`
  function automatic void patch(int at, word_t imm);
    int p;
    p = at + 1 + int'(prog[at][15]);
    prog[p]     = imm[31:16];
    prog[p + 1] = imm[15:0];
  endfunction

  // common forms
  function automatic logic [15:0] nop();
    return c3(0, 0, BI_NONE, ALU_MOV, 0, 0);
  endfunction

  function automatic int movi(int rd, word_t v);
    return ins(c3(0, 0, BI_IMM, ALU_MOV, rd, 0), '0, '0, v);
  endfunction

  // wait here forever: MOVPC into R0 makes "branch if flag is 0" taken
  function automatic int halt();
    int at;
    at = prog.size();
    return ins(c3(0, 0, BI_BNF, ALU_MOVPC, 0, 0), '0, '0, word_t'(at));
  endfunction

  // words of the program for loading at word address 0
  function automatic word_t word_at(int w);
    logic [15:0] hi, lo;
    hi = (2 * w < prog.size())     ? prog[2 * w]     : nop();
    lo = (2 * w + 1 < prog.size()) ? prog[2 * w + 1] : nop();
    return {hi, lo};
  endfunction
endpackage
