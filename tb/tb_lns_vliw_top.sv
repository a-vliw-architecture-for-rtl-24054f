// tb_lns_vliw_top: end-to-end test of the processor with its unified memory,
// at the default parameters.
//
// A program is assembled in the testbench and loaded through the host port.
// It runs these pieces one after the other, each storing its results to a
// result area that the testbench reads back at the end:
//   1. the unrolled sum of products of two length-8 vectors with LOADD, LMUL,
//      LADDQ and LADDQW (positive data; the sum must be readable by the
//      instruction issued 22 cycles after the first load);
//   2. the same code on data whose partial sums nearly cancel, so quick
//      additions take the two-cycle slow path (22 cycles plus 2 per slow
//      path, same result as exact arithmetic);
//   3. the LIMQ summation loop for vector lengths 4 and 6 (13 cycles for
//      length 4 and 3 more per extra element; the loop branch is taken for
//      length 6);
//   4. conversion of 32-bit unsigned integers to LNS with ROMLOG, ROR, AND,
//      LDIV, LADDQ and LMUL (11 cycles to the final multiply);
//   5. a subroutine call with MOVPC and the "flag is 0" branch, checking the
//      saved return address;
//   6. an LADD followed by an LADDQ two cycles later, which meets a
//      structural hazard, and an LSUBQ of nearly equal values.
// The program runs twice: once with the data memory always ready (timing is
// checked) and once with the data port randomly not ready (memory stalls);
// both runs must store bit-identical results.  Every stall mechanism is
// counted (W wait, slow path, hazard hold, memory stall) together with taken
// branches and MOVPC; a mechanism that never occurred counts as a failure.
module tb_lns_vliw_top;
  import lns_pkg::*;
  import tb_lns_util::*;
  import tb_vliw_asm::*;

  logic  clk = 0, rst, d_ready, h_we;
  word_t h_addr, h_wdata, h_rdata, pc;
  logic  flag, issue, illegal, br_taken, lns_hold, lns_slow, lns_busy;
  int    checks = 0, failures = 0;

  lns_vliw_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int RES = 3000;     // result area (word address)
  localparam int XA  = 2048;     // data vectors
  localparam int NRES = 16;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ data
  real va [8], vb [8], wa [8], wb [8], s4 [6], s6 [6];
  word_t conv [2];

  // LNS constants used as immediates
  function automatic word_t lc(real v);
    return to_lns(v);
  endfunction

  // ------------------------------------------------------------ program
  // labels (chunk addresses) whose issue cycles are measured
  int l_dot1, l_dot1_end, l_dot2, l_dot2_end, l_lq4, l_lq4_end, l_lq6, l_lq6_end;
  int l_rl [2], l_rl_end [2], l_call_ret, l_done;

  function automatic void store(int rt);
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(0, 0, rt, 12, 13)));
  endfunction

  // sum of products; returns the label of the first load, *end = the store
  function automatic int dot(int xaddr, int yaddr, output int end_at);
    int first;
    void'(movi(1, word_t'(xaddr)));
    void'(movi(2, word_t'(yaddr)));
    void'(movi(3, 2));
    void'(movi(10, LNS_ZERO));
    // cycle 1, 2: first elements of y and x
    first = ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(1, 1, 6, 2, 3));
    void'(ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(1, 1, 4, 1, 3)));
    // cycles 3..10: products into R6..R9 and four running sums in R10
    void'(ins(c3(0, 1, BI_NONE, ALU_LMUL, 6, 4), '0, c1(1, 1, 8, 2, 3)));
    void'(ins(c3(1, 1, BI_NONE, ALU_LMUL, 7, 5), c2(LNS_LADDQ, 0, 10, 10, 6), c1(1, 1, 4, 1, 3)));
    void'(ins(c3(1, 1, BI_NONE, ALU_LMUL, 8, 4), c2(LNS_LADDQ, 0, 10, 10, 7), c1(1, 1, 6, 2, 3)));
    void'(ins(c3(1, 1, BI_NONE, ALU_LMUL, 9, 5), c2(LNS_LADDQ, 0, 10, 10, 8), c1(1, 1, 4, 1, 3)));
    void'(ins(c3(1, 1, BI_NONE, ALU_LMUL, 6, 4), c2(LNS_LADDQ, 0, 10, 10, 9), c1(1, 1, 8, 2, 3)));
    void'(ins(c3(1, 1, BI_NONE, ALU_LMUL, 7, 5), c2(LNS_LADDQ, 0, 10, 10, 6), c1(1, 1, 4, 1, 3)));
    void'(ins(c3(1, 0, BI_NONE, ALU_LMUL, 8, 4), c2(LNS_LADDQ, 0, 10, 10, 7)));
    void'(ins(c3(1, 0, BI_NONE, ALU_LMUL, 9, 5), c2(LNS_LADDQ, 0, 10, 10, 8)));
    // cycles 11..19: combine the four partial sums
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADDQ, 0, 10, 10, 9)));
    void'(ins(c3(0, 0, BI_NONE, ALU_MOV, 11, 10)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADDQ, 0, 11, 10, 11)));
    void'(ins(c3(0, 0, BI_NONE, ALU_MOV, 11, 10)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADDQ, 1, 10, 10, 11)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADDQ, 1, 10, 10, 11)));
    end_at = prog.size();
    store(10);
    return first;
  endfunction

  // LIMQ summation of n >= 4 elements at xaddr
  function automatic int limq_sum(int xaddr, int n, output int end_at);
    int first, loop;
    void'(movi(6, word_t'(n - 4)));
    void'(movi(4, 2));
    void'(movi(3, 1));
    void'(movi(2, word_t'(xaddr)));
    first = ins(c3(0, 1, BI_NONE, ALU_MOV, 0, 0), '0, c1(1, 1, 10, 2, 4));
    void'(ins(c3(0, 1, BI_NONE, ALU_LDIV, 10, 11), '0, c1(0, 1, 8, 2, 3)));
    void'(ins(c3(0, 0, BI_NONE, ALU_LDIV, 11, 8)));
    loop = ins(c3(0, 0, BI_IMM, ALU_ADD, 6, 0), '0, '0, 32'hFFFF_FFFF);
    void'(ins(c3(1, 1, BI_NONE, ALU_MOV, 11, 8), c2(LNS_LIMQ, 0, 10, 10, 11), c1(0, 1, 8, 2, 3)));
    void'(ins(c3(0, 0, BI_BT, ALU_LDIV, 11, 8), '0, '0, word_t'(loop)));
    void'(ins(nop()));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 11, 8), c2(LNS_LIMQ, 1, 10, 10, 11)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LIMQ, 1, 10, 10, 11)));
    end_at = prog.size();
    store(10);
    return first;
  endfunction

  // integer in R1 to LNS in R6
  function automatic int romlog32(word_t n, output int end_at);
    int first;
    void'(movi(1, n));
    first = ins(c3(1, 0, BI_IMM, ALU_ROR, 1, 0), c2(LNS_ROMLOG, 0, 2, 1, 0), '0, 11);
    void'(ins(c3(1, 0, BI_IMM, ALU_LDIV, 2, 0), c2(LNS_ROMLOG, 0, 3, 1, 0), '0, lc(2048.0)));
    void'(ins(c3(1, 0, BI_IMM, ALU_ROR, 1, 0), c2(LNS_LADDQ, 0, 4, 3, 2), '0, 11));
    void'(ins(c3(0, 0, BI_IMM, ALU_AND, 1, 0), '0, '0, 32'h3ff));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_ROMLOG, 0, 5, 1, 0)));
    void'(ins(nop()));
    void'(ins(c3(0, 0, BI_IMM, ALU_LDIV, 4, 0), '0, '0, lc(2048.0)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADDQ, 1, 6, 5, 4)));
    end_at = ins(c3(0, 0, BI_IMM, ALU_LMUL, 6, 0), '0, '0, lc(2048.0 * 2048.0));
    store(6);
    return first;
  endfunction

  function automatic void build();
    int call, sub;
    prog.delete();
    void'(movi(12, RES));
    void'(movi(13, 1));
    l_dot1 = dot(XA, XA + 8, l_dot1_end);                     // result 0
    l_dot2 = dot(XA + 16, XA + 24, l_dot2_end);               // result 1
    l_lq4  = limq_sum(XA + 32, 4, l_lq4_end);                 // result 2
    l_lq6  = limq_sum(XA + 40, 6, l_lq6_end);                 // result 3
    l_rl[0] = romlog32(conv[0], l_rl_end[0]);                 // result 4
    l_rl[1] = romlog32(conv[1], l_rl_end[1]);                 // result 5
    // call: save the return address in R14 and branch unconditionally
    call = ins(c3(0, 0, BI_BNF, ALU_MOVPC, 14, 0), '0, '0, '0);
    l_call_ret = prog.size();
    store(15);                                                // result 7
    // hazard: LADD, one instruction, then LADDQ meeting it
    void'(movi(7, lc(3.0)));
    void'(movi(8, lc(5.0)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADD, 0, 9, 7, 8)));
    void'(ins(nop()));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LADDQ, 0, 7, 7, 8)));
    void'(movi(8, lc(2.5)));
    void'(movi(5, lc(3.0)));
    void'(ins(c3(1, 0, BI_NONE, ALU_MOV, 0, 0), c2(LNS_LSUBQ, 0, 11, 5, 8)));
    repeat (6) void'(ins(nop()));
    store(9);                                                 // result 8
    store(7);                                                 // result 9
    store(11);                                                // result 10
    l_done = halt();
    // subroutine: store the return address, set R15, jump back
    sub = ins(nop());
    store(14);                                                // result 6
    void'(movi(15, 32'h1234_5678));
    void'(ins(c3(0, 0, BI_BNF, ALU_MOVPC, 0, 0), '0, '0, word_t'(l_call_ret)));
    patch(call, word_t'(sub));
  endfunction

  // ------------------------------------------------------------ run
  longint cyc;
  longint t_at [int];                 // first issue cycle of a chunk address
  int n_wait, n_slow, n_hold, n_miss, n_br, n_movpc, n_stall, n_illegal;
  word_t res [2][NRES];

  always @(posedge clk) begin
    if (rst) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      if (!issue) n_stall++;
      if (dut.u_core.waiting) n_wait++;
      if (lns_slow && dut.u_core.en) n_slow++;
      if (lns_hold) n_hold++;
      if (dut.u_core.miss) n_miss++;
      if (br_taken) n_br++;
      if (issue && dut.u_core.movpc) n_movpc++;
      if (issue && illegal) n_illegal++;
      if (issue && !t_at.exists(int'(pc))) t_at[int'(pc)] = cyc;
    end
  end

  task automatic run(int k, bit stalls);
    t_at.delete();
    rst = 1; d_ready = 1; h_we = 0;
    repeat (2) @(negedge clk);
    // load the program and the data
    for (int w = 0; w < (prog.size() + 1) / 2 + 2; w++) begin
      h_we = 1; h_addr = word_t'(w); h_wdata = word_at(w);
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      h_addr = XA + i;      h_wdata = lc(va[i]); @(negedge clk);
      h_addr = XA + 8 + i;  h_wdata = lc(vb[i]); @(negedge clk);
      h_addr = XA + 16 + i; h_wdata = lc(wa[i]); @(negedge clk);
      h_addr = XA + 24 + i; h_wdata = lc(wb[i]); @(negedge clk);
    end
    for (int i = 0; i < 6; i++) begin
      h_addr = XA + 32 + i; h_wdata = lc(s4[i]); @(negedge clk);
      h_addr = XA + 40 + i; h_wdata = lc(s6[i]); @(negedge clk);
    end
    for (int i = 0; i < NRES; i++) begin
      h_addr = RES + i; h_wdata = 32'hDEAD_0000; @(negedge clk);
    end
    h_we = 0;
    rst = 0;
    // run until the halt instruction has been reached
    for (int c = 0; c < 4000 && !(issue && int'(pc) == l_done); c++) begin
      d_ready = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
    end
    check(int'(pc) == l_done, $sformatf("run %0d reached the end (pc %0d)", k, pc));
    repeat (4) @(negedge clk);
    for (int i = 0; i < NRES; i++) begin
      h_addr = RES + i; #1; res[k][i] = h_rdata;
    end
    @(negedge clk);
  endtask

  function automatic longint dt(int a, int b);
    if (!t_at.exists(a) || !t_at.exists(b)) return -1;
    return t_at[b] - t_at[a];
  endfunction

  task automatic check_val(int k, int i, real want, real tol, string what);
    real got;
    got = from_lns(res[k][i]);
    check(got - want <= tol && want - got <= tol,
          $sformatf("run %0d %s: got %g want %g", k, what, got, want));
  endtask

  initial begin
    real d1, d2, m1, m2, q4, q6;
    int slow_before, slow_after;
    // positive vectors; vectors whose partial sums nearly cancel
    for (int i = 0; i < 8; i++) begin
      va[i] = 0.5 + 0.37 * i;
      vb[i] = 3.0 - 0.29 * i;
    end
    wa = '{1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0, 1.0};
    wb = '{3.0, 5.0, -1.0, 2.0, -2.0, -4.5, 1.7, -1.2};
    s4 = '{1.5, 2.25, 0.75, 4.0, 0.0, 0.0};
    s6 = '{0.3, 1.1, 2.7, 0.9, 5.5, 1.25};
    conv = '{32'hDEAD_BEEF, 32'h0012_3400};
    d1 = 0; d2 = 0; m1 = 0; m2 = 0; q4 = 0; q6 = 0;
    for (int i = 0; i < 8; i++) begin
      d1 += va[i] * vb[i];  m1 += va[i] * vb[i];
      d2 += wa[i] * wb[i];  m2 += (wa[i] * wb[i] < 0) ? -wa[i] * wb[i] : wa[i] * wb[i];
    end
    for (int i = 0; i < 4; i++) q4 += s4[i];
    for (int i = 0; i < 6; i++) q6 += s6[i];
    build();
    n_wait = 0; n_slow = 0; n_hold = 0; n_miss = 0; n_br = 0; n_movpc = 0; n_stall = 0;
    n_illegal = 0;

    // ---------------- run 0: data memory always ready, timing checked
    run(0, 1'b0);
    check(dt(l_dot1, l_dot1_end) == 22,
          $sformatf("sum of products: store issued %0d cycles after the first load, expected 22",
                    dt(l_dot1, l_dot1_end)));
    // the slow paths of the second dot product: count them from the trace
    slow_before = n_slow;
    check(dt(l_dot2, l_dot2_end) > 22 && (dt(l_dot2, l_dot2_end) - 22) % 2 == 0,
          $sformatf("cancelling sum of products took %0d cycles (22 + 2 per slow path expected)",
                    dt(l_dot2, l_dot2_end)));
    check(dt(l_lq4, l_lq4_end) == 13,
          $sformatf("LIMQ sum n=4: %0d cycles, expected 13", dt(l_lq4, l_lq4_end)));
    check(dt(l_lq6, l_lq6_end) == 19,
          $sformatf("LIMQ sum n=6: %0d cycles, expected 19", dt(l_lq6, l_lq6_end)));
    for (int j = 0; j < 2; j++)
      check(dt(l_rl[j], l_rl_end[j]) == 11,
            $sformatf("ROMLOG conversion: final multiply after %0d cycles, expected 11",
                      dt(l_rl[j], l_rl_end[j])));
    check(n_miss == 0, "no memory stall in run 0");
    $display("cycles: sum of products %0d, cancelling %0d (slow paths %0d), LIMQ n=4 %0d, n=6 %0d, ROMLOG %0d %0d",
             dt(l_dot1, l_dot1_end), dt(l_dot2, l_dot2_end), n_slow, dt(l_lq4, l_lq4_end),
             dt(l_lq6, l_lq6_end), dt(l_rl[0], l_rl_end[0]), dt(l_rl[1], l_rl_end[1]));
    slow_after = n_slow;

    // ---------------- run 1: random data-port waits
    run(1, 1'b1);
    check(n_miss > 0, "memory stalls happened in run 1");

    // ---------------- results
    for (int k = 0; k < 2; k++) begin
      check_val(k, 0, d1, 1e-5 * m1, "sum of products");
      check_val(k, 1, d2, 1e-5 * m2, "cancelling sum of products");
      check_val(k, 2, q4, 1e-5 * q4, "LIMQ sum n=4");
      check_val(k, 3, q6, 1e-5 * q6, "LIMQ sum n=6");
      for (int j = 0; j < 2; j++)
        check_val(k, 4 + j, real'(conv[j]), 1e-5 * real'(conv[j]), "ROMLOG conversion");
      check(res[k][6] == word_t'(l_call_ret),
            $sformatf("run %0d MOVPC return address %0d, expected %0d", k, res[k][6], l_call_ret));
      check(res[k][7] == 32'h1234_5678, $sformatf("run %0d subroutine result %h", k, res[k][7]));
      check_val(k, 8, 8.0, 1e-5, "LADD before the hazard");
      check_val(k, 9, 8.0, 1e-5, "LADDQ after the hazard");
      check_val(k, 10, 0.5, 1e-5, "LSUBQ near the singularity");
    end
    $display("results: %g %g %g %g %g %g ret %0d r15 %h %g %g %g",
             from_lns(res[0][0]), from_lns(res[0][1]), from_lns(res[0][2]), from_lns(res[0][3]),
             from_lns(res[0][4]), from_lns(res[0][5]), res[0][6], res[0][7],
             from_lns(res[0][8]), from_lns(res[0][9]), from_lns(res[0][10]));
    $display("expected: %g %g %g %g %g %g ret %0d", d1, d2, q4, q6, real'(conv[0]), real'(conv[1]), l_call_ret);
    for (int i = 0; i < 11; i++)
      check(res[0][i] == res[1][i], $sformatf("result %0d differs between runs: %h %h",
                                              i, res[0][i], res[1][i]));

    // ---------------- every mechanism must have happened
    $display("cycles stalled %0d, W waits %0d, slow paths %0d, hazard holds %0d, memory stalls %0d, branches %0d, MOVPC %0d",
             n_stall, n_wait, n_slow, n_hold, n_miss, n_br, n_movpc);
    check(n_stall > 0,   "stall never happened");
    check(n_wait > 0,    "W wait never happened");
    check(n_slow > 0 && slow_after > 0, "slow path never happened");
    check(n_hold > 0,    "hazard hold never happened");
    check(n_miss > 0,    "memory stall never happened");
    check(n_br > 0,      "branch never taken");
    check(n_movpc > 0,   "MOVPC never executed");
    check(n_illegal == 0, "illegal instruction issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
