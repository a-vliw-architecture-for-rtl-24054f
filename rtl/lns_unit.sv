// lns_unit: the pipelined LNS addition unit of the VLIW processor.
//
// It executes the chunk2 operations (Ra, Rb, Rc are the operand fields):
//   LADD / LSUB     Ra <- Rb +/- Rc              latency 6 cycles
//   LADDQ / LSUBQ   Ra <- Rb +/- Rc              latency 4, or 6 near the
//                                                subtraction singularity
//   LIM             Ra <- (1 + Rb) * Rc          latency 5
//   LIMQ            Ra <- (1 + Rb) * Rc          latency 3, or 5
//   ROMLOG          Ra <- log of the integer Rb[10:0]   latency 1
// Latency L means the instruction issued L cycles later reads the result.
//
// How it works.  Addition uses T = Y + F(X - Y) with F = sb (equal signs) or
// db (unequal signs); LSUB flips the sign of Y first.  Stage A ("LNS divide /
// integer sub") forms z = X - Y, the result sign and the special cases (a zero
// operand, or exact cancellation) in the issue cycle.  Two co-transformation
// stages (C1, C2, module lns_cotrans) follow; they do real work only for db
// with |z| < 1 and are skipped by the quick (Q) forms when not needed.  Then
// the two interpolator stages (I1 ROM, I2 multiply/add, module lns_interp)
// and the final add (W stage, "LNS multiply / integer add") which writes the
// register file at the end of its cycle.  LIM and LIMQ skip stage A: Rb is
// already the ratio z and Rc the base Y, so (1 + x) * y = y + F(log x).
//
//   LADD, LSUB       :  A  C1 C2 I1 I2 W
//   LADDQ, LSUBQ     :  A  I1 I2 W      (A C1 C2 during the hold if needed)
//   LIM              :  C1 C2 I1 I2 W
//   LIMQ             :  I1 I2 W         (C1 C2 during the hold if needed)
//
// Stalls.  A quick (Q) operation that needs the co-transformation takes
// its two extra cycles before it issues: for two cycles `hold` is high, the
// whole pipeline is frozen, and a second pair of co-transformation stages
// (the detour) processes the operands; the operation then issues as a quick
// one with the transformed operands.  All other operations in flight are
// delayed by the same two cycles, so latencies counted in instructions do
// not change (always 4 for LADDQ, 3 for LIMQ).  The W bit asks the issue
// control, through `stall_after`, for cycles without issue until the result
// is written (delay equals latency); the pipeline runs on meanwhile.  `hold`
// is also raised for one cycle when the operation would meet an earlier one
// at the entry of C1 or I1, or, for ROMLOG, at the write port or the shared
// ROM.
//
// The operation set, the six/four-cycle latencies, the two-cycle Q stall of
// all units, the W bit, LIM skipping the first stage and ROMLOG sharing the
// co-transformation ROM follow the machine description.  Placing the Q stall
// before issue with a separate detour pair of stages, the LIM latency of 5
// without Q, the structural-hazard holds, the opcode numbering and the
// number formats are this design's choices.
//
// Interface: the operation is presented with the register values every cycle
// (`op_valid`); the issue control must not issue while `hold` is high; the
// operation enters the pipeline in a cycle where `issue` and `en` are both
// high.  `en` low (memory stall) freezes the whole unit.  `slow_q` marks the
// first cycle of a detour.  The detour instance's ROMLOG output is left
// open on purpose: only the main co-transformation stages serve ROMLOG.
module lns_unit
  import lns_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  logic    op_valid,
  input  lns_op_e op,
  input  logic    w,
  input  reg_t    ra,
  input  word_t   xb,
  input  word_t   xc,
  input  logic    issue,
  output logic    hold,
  output logic    hazard,          // part of hold: structural hazard
  output logic [2:0] stall_after,
  output logic    slow_q,          // first cycle of a detour
  output logic    wb_we,
  output reg_t    wb_addr,
  output word_t   wb_data,
  output logic    busy
);

  typedef struct packed {
    logic               valid;
    reg_t               ra;
    logic               sign;
    logic               special;   // result known in stage A
    word_t              spec_val;
    logic               sub;       // db
    logic               apply;     // needs co-transformation
    logic               fast;      // skips C1/C2
    logic signed [33:0] z;
    logic signed [35:0] base;
  } lns_pl_t;

  // ------------------------------------------------------------- stage A
  logic    is_lim, is_q, is_romlog, is_add;
  word_t   x, y;
  logic    xs;
  lns_pl_t pa;

  always_comb begin
    is_lim    = (op == LNS_LIM) || (op == LNS_LIMQ);
    is_q      = (op == LNS_LADDQ) || (op == LNS_LSUBQ) || (op == LNS_LIMQ);
    is_romlog = (op == LNS_ROMLOG);
    is_add    = (op inside {LNS_LADD, LNS_LSUB, LNS_LADDQ, LNS_LSUBQ});
    x  = xb;
    y  = xc;
    if (op == LNS_LSUB || op == LNS_LSUBQ) y[31] = ~xc[31];
    pa = '0;
    pa.valid = op_valid && (is_lim || is_add);
    pa.ra    = ra;
    pa.base  = 36'(signed'(y[LOGW-1:0]));
    if (is_lim) begin
      // (1 + x) * y : ratio is Rb itself, sign of x*y is xb ^ xc
      xs     = xb[31] ^ xc[31];
      pa.sub = xb[31];
      pa.z   = 34'(signed'(xb[LOGW-1:0]));
      if (lns_is_zero(xc))       begin pa.special = 1'b1; pa.spec_val = LNS_ZERO; end
      else if (lns_is_zero(xb))  begin pa.special = 1'b1; pa.spec_val = xc;       end
    end else begin
      xs     = x[31];
      pa.sub = x[31] ^ y[31];
      pa.z   = 34'(signed'(x[LOGW-1:0])) - 34'(signed'(y[LOGW-1:0]));
      if (lns_is_zero(x))        begin pa.special = 1'b1; pa.spec_val = y; end
      else if (lns_is_zero(y))   begin pa.special = 1'b1; pa.spec_val = x; end
    end
    if (!pa.special && pa.sub && pa.z == '0) begin
      pa.special  = 1'b1;
      pa.spec_val = LNS_ZERO;
    end
    if (pa.special && lns_is_zero(pa.spec_val)) pa.spec_val = LNS_ZERO;
    pa.sign  = (pa.z > 0) ? xs : y[31];
    pa.apply = !pa.special && pa.sub && (pa.z > -34'sd8388608) && (pa.z < 34'sd8388608);
    pa.fast  = 1'b0;
  end

  // ------------------------------------------------------------- pipeline state
  lns_pl_t sA;                   // after stage A (add/sub forms)
  lns_pl_t c_in;                 // entry of C1
  lns_pl_t sC1, sC2;             // sideband alongside lns_cotrans
  lns_pl_t i_in;                 // entry of I1
  lns_pl_t sI1, sI2;             // sideband alongside lns_interp
  lns_pl_t pq;                   // issuing operation after any detour
  logic               ct_sub, d_sub;
  logic signed [33:0] ct_z, d_z;
  logic signed [35:0] ct_base, d_base;
  logic signed [33:0] ip_f;
  word_t              romlog_q;
  logic               go, adv, freeze, need_d;
  logic [1:0]         dst;       // detour: 0 idle, 1 second cycle, 2 done

  // A quick operation that needs the co-transformation first runs through
  // the detour stages while everything else is frozen.
  always_comb begin
    need_d = op_valid && is_q && pa.apply;
    freeze = (dst == 2'd0 && need_d && !hazard) || dst == 2'd1;
    hold   = hazard || freeze;
    adv    = en && !freeze;
    go     = issue && en && op_valid;
    pq     = pa;
    if (is_q) pq.fast = 1'b1;
    if (dst == 2'd2) begin
      pq.apply = 1'b0;
      pq.sub   = d_sub;
      pq.z     = d_z;
      pq.base  = d_base;
    end
  end

  always_comb begin
    // C1 entry: add forms one cycle after A, LIM straight from issue
    c_in = '0;
    if (sA.valid && !sA.fast)                 c_in = sA;
    else if (go && is_lim && !is_q)           c_in = pq;
    // I1 entry: quick add forms from A, anything leaving C2, LIMQ from issue
    i_in = '0;
    if (sA.valid && sA.fast)                  i_in = sA;
    else if (sC2.valid) begin
      i_in      = sC2;
      i_in.z    = ct_z;
      i_in.base = ct_base;
      i_in.sub  = ct_sub;
    end
    else if (go && is_lim && is_q)            i_in = pq;
  end

  // ------------------------------------------------------------- hazards
  always_comb begin
    hazard = 1'b0;
    if (op_valid) begin
      if (is_add && is_q)          hazard = sC1.valid;
      else if (is_lim && is_q)     hazard = (sA.valid && sA.fast) || sC2.valid;
      else if (is_lim)             hazard = sA.valid && !sA.fast;
      else if (is_romlog)          hazard = sI2.valid || (sA.valid && !sA.fast && sA.apply);
    end
  end

  always_comb begin
    int lat;
    if (is_romlog)       lat = 1;
    else if (is_lim)     lat = is_q ? 3 : 5;
    else                 lat = is_q ? 4 : 6;
    slow_q = freeze && dst == 2'd0;
    if (!op_valid || !(is_romlog || is_lim || is_add) || !w) stall_after = '0;
    else                 stall_after = 3'(lat - 1);
  end

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      sA  <= '0;
      sC1 <= '0;
      sC2 <= '0;
      sI1 <= '0;
      sI2 <= '0;
      dst <= '0;
    end else if (en) begin
      if (adv) begin
        sA  <= (go && is_add) ? pq : '0;
        sC1 <= c_in;
        sC2 <= sC1;
        sI1 <= i_in;
        sI2 <= sI1;
      end
      if (freeze)   dst <= dst + 2'd1;
      else if (go)  dst <= '0;
    end
  end

  lns_cotrans u_cotrans (
    .clk      (clk),
    .en       (adv),
    .apply    (c_in.valid && c_in.apply),
    .sub      (c_in.sub),
    .z        (c_in.z),
    .base     (c_in.base),
    .sub_o    (ct_sub),
    .z_o      (ct_z),
    .base_o   (ct_base),
    .romlog_k (xb[10:0]),
    .romlog_q (romlog_q)
  );

  // Detour pair for quick operations; its ROMLOG output is not used.
  lns_cotrans u_detour (
    .clk      (clk),
    .en       (en && freeze),
    .apply    (1'b1),
    .sub      (pa.sub),
    .z        (pa.z),
    .base     (pa.base),
    .sub_o    (d_sub),
    .z_o      (d_z),
    .base_o   (d_base),
    .romlog_k (11'd0),
    .romlog_q ()
  );

  lns_interp u_interp (
    .clk (clk),
    .en  (adv),
    .z   (i_in.z),
    .sub (i_in.sub),
    .f   (ip_f)
  );

  // ------------------------------------------------------------- W stage
  logic signed [35:0] tsum;
  logic [LOGW-1:0]    tlog;

  always_comb begin
    tsum = sI2.base + 36'(ip_f);
    tlog = lns_sat(tsum);
    wb_we   = 1'b0;
    wb_addr = sI2.ra;
    wb_data = '0;
    if (adv && sI2.valid) begin
      wb_we   = 1'b1;
      wb_data = sI2.special ? sI2.spec_val
              : (tlog == LOG_ZERO) ? LNS_ZERO : {sI2.sign, tlog};
    end else if (go && is_romlog) begin
      wb_we   = 1'b1;
      wb_addr = ra;
      wb_data = romlog_q;
    end
  end

  assign busy = sA.valid || sC1.valid || sC2.valid || sI1.valid || sI2.valid
              || dst != 2'd0;

  // The hazard rules make the C1 and I1 entries exclusive.
  property p_one_c1;
    @(posedge clk) disable iff (rst)
      !(sA.valid && !sA.fast && go && is_lim && !is_q);
  endproperty
  property p_one_i1;
    @(posedge clk) disable iff (rst)
      $onehot0({sA.valid && sA.fast, sC2.valid, go && is_lim && is_q});
  endproperty
  a_one_c1: assert property (p_one_c1);
  a_one_i1: assert property (p_one_i1);

endmodule
