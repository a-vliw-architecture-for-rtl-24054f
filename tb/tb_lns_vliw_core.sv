// tb_lns_vliw_core: self-checking test of the processor core, with the
// unified memory as its code and data store and a data port that is randomly
// not ready.
// The assembled program applies every ALU operation to random operands and
// stores each result and the flag after it (the flag is captured with an
// add-with-carry of 0 into a cleared register); it tests taken and not-taken
// branches of both conditions, register 0 as the immediate operand, the
// discarded write to R0, single and double stores and loads with a negative
// post-increment, and an LNS addition whose result is stored.  The expected
// values come from a model of the instruction set written here.
module tb_lns_vliw_core;
  import lns_pkg::*;
  import tb_lns_util::*;
  import tb_vliw_asm::*;

  logic        clk = 0, rst, d_ready, d_we, h_we;
  word_t       f_addr, d_addr, pc, h_addr, h_wdata, h_rdata;
  logic [63:0] f_data, d_rdata, d_wdata;
  logic [1:0]  d_wmask;
  logic        flag, issue, illegal, br_taken, lns_hold, lns_slow, lns_busy;
  int          checks = 0, failures = 0, n_miss = 0;

  lns_vliw_core dut (.*);
  vliw_memory   mem (.clk, .f_addr, .f_data, .d_addr, .d_rdata, .d_we, .d_wmask, .d_wdata,
                     .h_we, .h_addr, .h_wdata, .h_rdata);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && dut.miss) n_miss++;

  localparam int RES = 3000;
  localparam int NT  = 120;

  word_t exp_res [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void store(int rt);
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(0, 0, rt, 12, 13)));
  endfunction

  // reference model of the one-cycle operations: {flag_written, flag, result}
  function automatic logic [33:0] model(alu_op_e op, word_t a, word_t b, logic f, word_t pcn);
    logic [32:0] s;
    logic signed [31:0] la, lb;
    la = 32'(signed'(a[30:0]));
    lb = 32'(signed'(b[30:0]));
    case (op)
      ALU_ADD: begin s = {1'b0, a} + {1'b0, b}; return {1'b1, s[32], s[31:0]}; end
      ALU_ADC: begin s = {1'b0, a} + {1'b0, b} + 33'(f); return {1'b1, s[32], s[31:0]}; end
      ALU_SUB: return {1'b1, signed'(a) < signed'(b), a - b};
      ALU_SBB: begin s = {1'b0, a} - {1'b0, b} - 33'(f); return {1'b1, s[32], s[31:0]}; end
      ALU_AND: return {2'b10, a & b};
      ALU_OR:  return {2'b10, a | b};
      ALU_XOR: return {1'b1, a == b, a ^ b};
      ALU_ROR: return {1'b0, f, (a >> b[4:0]) | (a << (32 - int'(b[4:0])))};
      ALU_MOV: return {1'b0, f, b};
      ALU_LMUL: return {1'b0, f, a[31] ^ b[31], 31'(la + lb)};
      ALU_LDIV: return {1'b1, from_lns(a) < from_lns(b), a[31] ^ b[31], 31'(la - lb)};
      ALU_LSQRT: return {1'b0, f, 1'b0, 31'(lb >>> 1)};
      ALU_LRECIP: return {1'b0, f, b[31], 31'(-lb)};
      ALU_LABS: return {1'b0, f, 1'b0, b[30:0]};
      ALU_LSQR: return {1'b0, f, 1'b0, 31'(lb + lb)};
      default: return {1'b1, 1'b0, pcn};
    endcase
  endfunction

  function automatic word_t operand(bit lns);
    if (lns) return to_lns(($urandom_range(0, 1) ? 1.0 : -1.0) * $pow(2.0, real'($urandom_range(0, 4000)) / 100.0 - 20.0));
    case ($urandom_range(0, 3))
      0: return word_t'($urandom_range(0, 20));
      1: return 32'hFFFF_FFFF - word_t'($urandom_range(0, 20));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic f;
    int nres, l_done, at_skip;
    alu_op_e ops [15] = '{ALU_LMUL, ALU_ADD, ALU_LDIV, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
                          ALU_SBB, ALU_ADC, ALU_ROR, ALU_MOV, ALU_LSQRT, ALU_LRECIP, ALU_LABS, ALU_LSQR};
    prog.delete();
    f = 0;
    void'(movi(12, RES));
    void'(movi(13, 1));
    // ---------------- ALU operations, result and flag
    for (int t = 0; t < NT; t++) begin
      alu_op_e op;
      word_t a, b;
      logic [33:0] m;
      bit ln;
      op = ops[$urandom_range(0, 14)];
      ln = op inside {ALU_LMUL, ALU_LDIV, ALU_LSQRT, ALU_LRECIP, ALU_LABS, ALU_LSQR};
      a = operand(ln);
      b = ($urandom_range(0, 7) == 0) ? a : operand(ln);
      if (op == ALU_XOR && $urandom_range(0, 1)) b = a;
      void'(movi(1, a));
      if ($urandom_range(0, 1)) begin
        void'(movi(2, b));
        void'(ins(c3(0, 0, BI_NONE, op, 1, 2)));
      end else begin
        void'(ins(c3(0, 0, BI_IMM, op, 1, 0), '0, '0, b));       // R0 is the immediate
      end
      m = model(op, a, b, f, '0);
      if (m[33]) f = m[32];
      exp_res.push_back(m[31:0]);
      void'(ins(c3(0, 0, BI_IMM, ALU_MOV, 3, 0), '0, '0, '0));
      void'(ins(c3(0, 0, BI_IMM, ALU_ADC, 3, 0), '0, '0, '0));
      exp_res.push_back(word_t'(f));
      f = 0;                                                     // 0 + 0 + f never carries
      store(1);
      store(3);
    end
    // ---------------- R0 writes are discarded; R0 then reads the immediate
    void'(ins(c3(0, 0, BI_IMM, ALU_MOV, 0, 0), '0, '0, 32'h5555_5555));
    void'(ins(c3(0, 0, BI_IMM, ALU_MOV, 4, 0), '0, '0, 32'h0000_0077));
    store(4);  exp_res.push_back(32'h77);
    // ---------------- branches: flag 1, BT taken (skips a write), BNF not taken
    void'(movi(5, 1));
    void'(ins(c3(0, 0, BI_IMM, ALU_SUB, 5, 0), '0, '0, 2));     // 1 < 2: flag 1
    at_skip = ins(c3(0, 0, BI_BT, ALU_MOV, 0, 0), '0, '0, '0);
    void'(movi(5, 32'hBAD));
    patch(at_skip, word_t'(prog.size()));
    void'(ins(c3(0, 0, BI_BNF, ALU_MOV, 0, 0), '0, '0, 32'hFFF0));  // not taken
    store(5);  exp_res.push_back(32'hFFFF_FFFF);                // 1 - 2
    void'(ins(c3(0, 0, BI_IMM, ALU_AND, 5, 0), '0, '0, 0));     // flag 0
    void'(ins(c3(0, 0, BI_BT, ALU_MOV, 0, 0), '0, '0, 32'hFFF0));  // not taken
    at_skip = ins(c3(0, 0, BI_BNF, ALU_MOV, 0, 0), '0, '0, '0);
    void'(movi(5, 32'hBAD));
    patch(at_skip, word_t'(prog.size()));
    store(5);  exp_res.push_back(32'h0);
    // ---------------- double store / load with a negative increment
    void'(movi(6, 32'h1111_2222));
    void'(movi(7, 32'h3333_4444));
    void'(movi(8, RES + 900));
    void'(movi(9, -2));
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(1, 0, 6, 8, 9)));   // [900],[901]
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(0, 0, 7, 8, 13)));  // [898]
    store(8);  exp_res.push_back(RES + 899);
    void'(movi(8, RES + 898));
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(1, 1, 10, 8, 3)));  // R10,R11 <- [898],[899]
    store(10); exp_res.push_back(32'h3333_4444);
    void'(movi(8, RES + 900));
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(1, 1, 10, 8, 13)));
    store(10); exp_res.push_back(32'h1111_2222);
    store(11); exp_res.push_back(32'h3333_4444);
    // ---------------- an LNS addition with the W bit
    void'(movi(1, to_lns(1.5)));
    void'(movi(2, to_lns(2.25)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADD, 1, 9, 1, 2)));
    store(9);  exp_res.push_back(to_lns(3.75));
    l_done = halt();

    // ---------------- load and run
    rst = 1; d_ready = 1; h_we = 0;
    repeat (2) @(negedge clk);
    for (int w = 0; w < (prog.size() + 1) / 2 + 2; w++) begin
      h_we = 1; h_addr = word_t'(w); h_wdata = word_at(w);
      @(negedge clk);
    end
    h_we = 0;
    rst = 0;
    for (int c = 0; c < 20000 && !(issue && int'(pc) == l_done); c++) begin
      d_ready = ($urandom_range(0, 3) != 0);
      check(!(issue && illegal), "illegal instruction issued");
      @(negedge clk);
    end
    check(int'(pc) == l_done, "program reached its end");
    repeat (8) @(negedge clk);
    nres = exp_res.size();
    for (int i = 0; i < nres; i++) begin
      word_t got;
      h_addr = RES + i; #1; got = h_rdata;
      if (i == nres - 1)
        check(ulp_dist(got, exp_res[i]) <= 128, $sformatf("LADD result %h want %h", got, exp_res[i]));
      else
        check(got == exp_res[i], $sformatf("result %0d: %h want %h", i, got, exp_res[i]));
    end
    check(n_miss > 0, "memory stalls occurred");
    $display("%0d stored results, %0d memory stall cycles", nres, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
