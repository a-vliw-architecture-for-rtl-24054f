// tb_vliw_decompress: self-checking test of the instruction decompressor.
// Builds random compressed instructions of every legal header (chunk3 alone,
// with an LNS chunk, a memory chunk, a 32-bit field, or combinations), packs
// their chunks in order into the four-chunk fetch window with random filler
// after them, and checks each decompressed field and the length.  Also
// checks that a header asking for both a memory chunk and a 32-bit field is
// flagged as prohibited.
module tb_vliw_decompress;
  import lns_pkg::*;

  logic [63:0] window;
  dec_instr_t instr;
  int checks = 0, failures = 0;

  vliw_decompress dut (.window, .instr);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] c3, c2, c1, st [$];
      logic [31:0] imm;
      bit l, m;
      logic [1:0] bi;
      int n;
      l  = 1'($urandom);
      m  = 1'($urandom);
      bi = m ? 2'b00 : 2'($urandom);
      c3 = {l, m, bi, 12'($urandom)};
      c2 = 16'($urandom);
      c1 = 16'($urandom);
      imm = $urandom;
      st.delete();
      st.push_back(c3);
      if (l) st.push_back(c2);
      if (m) st.push_back(c1);
      if (bi != 0) begin st.push_back(imm[31:16]); st.push_back(imm[15:0]); end
      n = st.size();
      while (st.size() < 4) st.push_back(16'($urandom));
      window = {st[0], st[1], st[2], st[3]};
      #1;
      check("len", 32'(instr.len), n);
      check("chunk3", 32'(instr.c3), 32'(c3));
      check("chunk2", 32'(instr.c2), l ? 32'(c2) : 0);
      check("chunk1", 32'(instr.c1), m ? 32'(c1) : 0);
      check("imm", instr.imm, (bi != 0) ? imm : 0);
      check("illegal", 32'(instr.illegal), 0);
    end
    // prohibited: memory chunk plus 32-bit field
    window = {16'h7123, 16'h0456, 16'hffff, 16'hffff};
    #1;
    check("illegal flag", 32'(instr.illegal), 1);
    check("illegal len", 32'(instr.len), 2);
    check("illegal bimm", 32'(instr.c3.bimm), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
