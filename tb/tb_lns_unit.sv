// tb_lns_unit: self-checking test of the pipelined LNS unit.
// Issues a random stream of LADD, LSUB, LADDQ, LSUBQ, LIM, LIMQ and ROMLOG
// operations, with and without the W bit, following the unit's issue rules
// (no issue while `hold` is high or a requested stall is counted down) and
// with occasional freeze cycles.  Operands include zeros, exact
// cancellations and nearly equal magnitudes of opposite sign.  For every
// operation it predicts, from the specification alone, the latency (6 for
// LADD/LSUB, 4 for quick forms, 5/3 for LIM/LIMQ, 1 for ROMLOG), the two
// frozen hold cycles before a quick form near the singularity issues, the
// requested stall (latency - 1 with the W bit) and the real-valued result,
// and checks that the result is written to the right register in exactly
// that cycle, counting only cycles where the pipeline moves, within 128 units
// in the last place of the logarithm.
// It counts how often the slow path, the hazard hold and the W stall occur.
module tb_lns_unit;
  import tb_lns_util::*;
  import lns_pkg::*;

  logic clk = 0, rst, en, op_valid, w, issue, hold, hazard, slow_q, wb_we, busy;
  lns_op_e op;
  reg_t ra, wb_addr;
  word_t xb, xc, wb_data;
  logic [2:0] stall_after;
  int checks = 0, failures = 0;
  int n_slow = 0, n_hold = 0, n_wait = 0, n_issued = 0;
  longint maxerr = 0;

  // as in the processor, an operation is only presented once a stall is over
  int    wait_cnt = 0;
  logic  op_in;
  assign op_in = op_valid && wait_cnt == 0;

  lns_unit dut (.clk, .rst, .en, .op_valid(op_in), .op, .w, .ra, .xb, .xc, .issue,
                .hold, .hazard, .stall_after, .slow_q, .wb_we, .wb_addr, .wb_data, .busy);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint cyc; reg_t ra; word_t val; } exp_t;
  exp_t expq [$];
  longint ecyc = 0;

  function automatic word_t pick_operand(word_t other);
    int r;
    r = $urandom_range(0, 9);
    if (r == 0) return LNS_ZERO;
    if (r == 1) return {~other[31], other[30:0]};                    // cancels
    if (r <= 4) return {~other[31], 31'(other[30:0] + 31'($urandom_range(0, 16000000)) - 31'd8000000)};
    return rnd_lns(20.0);
  endfunction

  // operands of effectively unequal sign with |log ratio| < 1 (not special)
  function automatic bit near_of(lns_op_e o, word_t b, word_t c);
    if (o == LNS_ROMLOG) return 0;
    if (lns_is_zero(b) || lns_is_zero(c)) return 0;
    if (o == LNS_LIM || o == LNS_LIMQ) return b[31] && lg(b) > -1.0 && lg(b) < 1.0;
    begin
      bit sgn_c;
      sgn_c = c[31] ^ (o == LNS_LSUB || o == LNS_LSUBQ);
      return (b[31] != sgn_c) && (lg(b) - lg(c) > -1.0) && (lg(b) - lg(c) < 1.0)
             && b[30:0] != c[30:0];
    end
  endfunction

  initial begin
    int dcnt = 0;
    int wc_next;
    bit frz;
    bit retire = 0;
    rst = 1; en = 1; op_valid = 0; op = LNS_LADD; w = 0; ra = '0; xb = '0; xc = '0; issue = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 6000; i++) begin
      // present an operation (held until it issues)
      if (!op_valid && $urandom_range(0, 3) != 0) begin
        op_valid = 1;
        op = lns_op_e'($urandom_range(0, 6));
        w  = ($urandom_range(0, 7) == 0);
        ra = reg_t'($urandom_range(1, 15));
        xb = rnd_lns(20.0);
        xc = pick_operand(xb);
        if (op == LNS_LIM || op == LNS_LIMQ) begin
          xb = ($urandom_range(0, 2) == 0) ? {1'b1, 31'($urandom_range(0, 16000000)) - 31'd8000000} : xb;
          if ($urandom_range(0, 15) == 0) xb = LNS_ZERO;
        end
        if (op == LNS_ROMLOG) xb = 32'($urandom_range(0, 2047));
      end
      en = ($urandom_range(0, 15) != 0);
      wc_next = wait_cnt;
      #1;
      // a quick form near the singularity: two frozen hold cycles first
      frz = op_valid && wait_cnt == 0 && dcnt < 2 && !hazard
            && (op == LNS_LADDQ || op == LNS_LSUBQ || op == LNS_LIMQ) && near_of(op, xb, xc);
      if (op_valid && wait_cnt == 0) begin
        checks++;
        if (hold != (frz || hazard) || slow_q != (frz && dcnt == 0)) begin
          failures++;
          $display("hold %b slow_q %b, expected %b %b (op %s dcnt %0d)", hold, slow_q,
                   frz || hazard, frz && dcnt == 0, op.name(), dcnt);
        end
      end
      if (frz && en) begin
        if (dcnt == 0) n_slow++;
        dcnt++;
      end
      issue = op_valid && !hold && wait_cnt == 0;
      if (op_valid && hazard && wait_cnt == 0 && en) n_hold++;
      #1;
      // model the issue
      if (issue && en) begin
        real vb, vc, r;
        bit q;
        int lat, st;
        exp_t e;
        vb = from_lns(xb);
        vc = from_lns(xc);
        q  = (op == LNS_LADDQ || op == LNS_LSUBQ || op == LNS_LIMQ);
        case (op)
          LNS_LADD, LNS_LADDQ: r = vb + vc;
          LNS_LSUB, LNS_LSUBQ: r = vb - vc;
          LNS_LIM,  LNS_LIMQ:  r = (1.0 + vb) * vc;
          default:             r = real'(xb[10:0]);
        endcase
        if (op == LNS_ROMLOG)                   lat = 1;
        else if (op == LNS_LIM || op == LNS_LIMQ) lat = q ? 3 : 5;
        else                                    lat = q ? 4 : 6;
        st = w ? lat - 1 : 0;
        dcnt = 0;
        checks++;
        if (int'(stall_after) != st) begin
          failures++;
          $display("stall_after %0d, expected %0d (op %s)", stall_after, st, op.name());
        end
        if (st > 0 && w) n_wait++;
        e.cyc = ecyc + longint'(lat) - 1;
        e.ra  = ra;
        e.val = to_lns(r);
        expq.push_back(e);
        n_issued++;
        wc_next = st;
        retire = 1;
      end else if (wait_cnt > 0 && en) begin
        wc_next = wait_cnt - 1;
      end
      // check the write port in this cycle
      if (wb_we) begin
        int idx;
        idx = -1;
        foreach (expq[k]) if (expq[k].cyc == ecyc) idx = k;
        checks++;
        if (idx < 0) begin
          failures++;
          $display("unexpected write r%0d at cycle %0d", wb_addr, ecyc);
        end else begin
          longint d;
          d = ulp_dist(wb_data, expq[idx].val);
          if (d > maxerr && d < (64'd1 << 40)) maxerr = d;
          if (wb_addr != expq[idx].ra || d > 128) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH cycle %0d r%0d got %h want r%0d %h (%0d ulp)", ecyc, wb_addr, wb_data,
                       expq[idx].ra, expq[idx].val, d);
          end
          expq.delete(idx);
        end
      end
      if (en && !frz) begin
        foreach (expq[k]) if (expq[k].cyc < ecyc) begin
          failures++;
          $display("missing write r%0d due at cycle %0d", expq[k].ra, expq[k].cyc);
          expq[k].cyc = 64'h7fffffffffffffff;
        end
      end
      @(posedge clk);
      if (en && !frz) ecyc++;
      @(negedge clk);
      wait_cnt = wc_next;
      if (retire) op_valid = 0;
      retire = 0;
      issue  = 0;
    end
    checks++;
    if (n_slow == 0 || n_hold == 0 || n_wait == 0) begin
      failures++;
      $display("a mechanism never occurred: slow=%0d hold=%0d wait=%0d", n_slow, n_hold, n_wait);
    end
    $display("issued %0d, slow path %0d, hazard holds %0d, W waits %0d, max error %0d ulp",
             n_issued, n_slow, n_hold, n_wait, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
