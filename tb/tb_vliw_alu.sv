// tb_vliw_alu: self-checking test of the one-cycle ALU.
// Random operands for every operation.  Integer results and flags are
// computed here with 64-bit arithmetic; LNS results and the LNS less-than
// flag with real arithmetic (1 unit in the last place allowed for the LNS
// results).  Covers the flag rules (cleared, carry, signed, unsigned,
// equality and LNS comparisons, left alone by LMUL/MOV), zero operands and
// saturation of an overflowing LNS product.
module tb_vliw_alu;
  import lns_pkg::*;
  import tb_lns_util::*;

  alu_op_e op;
  word_t a, b, pc_next, result;
  logic flag, wr, flag_out, flag_we, movpc;
  int checks = 0, failures = 0;

  vliw_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(word_t r, logic fwe, logic f);
    checks++;
    if (result !== r || flag_we !== fwe || (fwe && flag_out !== f) || (!fwe && flag_out !== flag)) begin
      failures++;
      if (failures < 10)
        $display("%s a=%h b=%h fl=%b: got %h we=%b f=%b want %h we=%b f=%b", op.name(), a, b, flag,
                 result, flag_we, flag_out, r, fwe, f);
    end
  endtask

  task automatic expect_lns(word_t r, logic fwe, logic f);
    checks++;
    if (ulp_dist(result, r) > 1 || flag_we !== fwe || (fwe && flag_out !== f)) begin
      failures++;
      if (failures < 10)
        $display("%s a=%h b=%h: got %h f=%b want %h f=%b", op.name(), a, b, result, flag_out, r, f);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] t;
      real va, vb;
      op   = alu_op_e'($urandom_range(0, 15));
      flag = 1'($urandom);
      pc_next = $urandom;
      if (op inside {ALU_LMUL, ALU_LDIV, ALU_LSQRT, ALU_LRECIP, ALU_LABS, ALU_LSQR}) begin
        a = ($urandom_range(0, 19) == 0) ? LNS_ZERO : rnd_lns(60.0);
        b = ($urandom_range(0, 19) == 0) ? LNS_ZERO : ($urandom_range(0, 9) == 0) ? a : rnd_lns(60.0);
      end else begin
        a = $urandom;
        b = ($urandom_range(0, 9) == 0) ? a : $urandom;
        if ($urandom_range(0, 9) == 0) b = 32'($urandom_range(0, 40));
      end
      #1;
      va = from_lns(a);
      vb = from_lns(b);
      case (op)
        ALU_LMUL:   expect_lns(to_lns(va * vb), 0, 0);
        ALU_LDIV:   expect_lns((va == 0.0) ? LNS_ZERO : (vb == 0.0) ? {a[31] ^ b[31], 31'h3fffffff} : to_lns(va / vb), 1, va < vb);
        ALU_ADD:    begin t = 64'(a) + 64'(b);        expect_int(t[31:0], 1, t[32]); end
        ALU_ADC:    begin t = 64'(a) + 64'(b) + 64'(flag); expect_int(t[31:0], 1, t[32]); end
        ALU_SUB:    expect_int(a - b, 1, $signed(a) < $signed(b));
        ALU_SBB:    expect_int(a - b - 32'(flag), 1, 64'(a) < 64'(b) + 64'(flag));
        ALU_AND:    expect_int(a & b, 1, 0);
        ALU_OR:     expect_int(a | b, 1, 0);
        ALU_XOR:    expect_int(a ^ b, 1, a == b);
        ALU_ROR:    begin t = {a, a} >> b[4:0]; expect_int(t[31:0], 0, 0); end
        ALU_MOVPC:  begin
                      expect_int(pc_next, 1, 0);
                      checks++;
                      if (!movpc) failures++;
                    end
        ALU_MOV:    expect_int(b, 0, 0);
        ALU_LSQRT:  expect_lns(to_lns($sqrt(vb < 0 ? -vb : vb)), 0, 0);
        ALU_LRECIP: expect_lns((vb == 0.0) ? {b[31], 31'h3fffffff} : to_lns(1.0 / vb), 0, 0);
        ALU_LABS:   expect_lns(to_lns(vb < 0 ? -vb : vb), 0, 0);
        ALU_LSQR:   expect_lns(to_lns(vb * vb), 0, 0);
        default: begin checks++; if (wr) failures++; end
      endcase
    end
    // overflow saturates
    op = ALU_LMUL; a = {1'b1, 31'd100 << 23}; b = {1'b0, 31'd100 << 23};
    #1;
    checks++;
    if (result !== {1'b1, 31'h3fffffff}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
