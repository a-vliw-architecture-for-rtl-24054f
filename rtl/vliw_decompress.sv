// vliw_decompress: expands a compressed VLIW instruction into its fixed-length
// decompressed form.
//
// A compressed instruction is one to four 16-bit chunks.  The first chunk
// (chunk3) is always present and carries the header bits: bit 15 says that an
// LNS-unit chunk (chunk2) follows, bit 14 that a memory-unit chunk (chunk1)
// follows, and bits 13:12 that a 32-bit immediate or branch address (two
// chunks, most significant first) follows.  Chunks appear in the order
// chunk3, chunk2, chunk1 / immediate.  Absent chunks decompress to zero.
// The memory chunk and the 32-bit field are mutually exclusive; a header that
// asks for both is flagged `illegal`, decoded with the memory chunk and
// without the 32-bit field (this treatment of the prohibited patterns is this
// design's choice).
//
// Interface: `window` holds the four chunks starting at the program counter,
// the chunk at the PC in bits 63:48.  Purely combinational; `instr.len` gives
// the number of chunks consumed.
module vliw_decompress
  import lns_pkg::*;
(
  input  logic [63:0] window,
  output dec_instr_t  instr
);

  logic [15:0] ch [4];
  chunk3_t     c3;
  logic [2:0]  pos;

  always_comb begin
    for (int i = 0; i < 4; i++) ch[i] = window[63-16*i -: 16];
    c3    = chunk3_t'(ch[0]);
    instr = '0;
    instr.c3 = c3;
    pos = 3'd1;
    if (c3.lns) begin
      instr.c2 = chunk2_t'(ch[1]);
      pos = 3'd2;
    end
    if (c3.mem) begin
      instr.c1 = chunk1_t'(ch[pos[1:0]]);
      pos = pos + 3'd1;
      if (c3.bimm != BI_NONE) begin
        instr.illegal = 1'b1;
        instr.c3.bimm = BI_NONE;
      end
    end else if (c3.bimm != BI_NONE) begin
      // pos is 1 or 2 here, so both immediate chunks lie in the window
      instr.imm = {ch[pos[1:0]], ch[pos[1:0] + 2'd1]};
      pos = pos + 3'd2;
    end
    instr.len = pos;
  end

endmodule
