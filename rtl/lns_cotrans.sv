// lns_cotrans: co-transformation stages for LNS subtraction near the
// singularity of db(z) = log2|1 - 2^z| at z = 0, and the ROMLOG conversion.
//
// A linear interpolator cannot follow db(z) for small |z|.  For -1 < z < 0
// these two stages split |z| into a high part a1 (bits 22:11, a multiple of
// 2^-12) and a low part a2 (bits 10:0, the low 11 bits of the format), with
// z1 = -a1 and z2 = -a2, and use the identity
//   db(z1 + z2) = db(z2) + sb(z2 + db(z1) - db(z2)),   sb(w) = log2(1 + 2^w)
// so the remaining work is an addition logarithm, which the interpolator
// handles well.  Stage 1 reads two ROMs: T1[a1] = db(z1) and
// R[a2] = db(z2) + log2(log2 e).  Stage 2 forms the new base
// Y' = Y + db(z2) and the new argument w; when a1 or a2 is zero the other
// term alone is the answer and w is driven far negative so that sb(w) = 0.
// A positive z is first folded (db(z) = z + db(-z)).  When `apply` is low
// the stages only delay their inputs.
//
// The R ROM is the one a ROMLOG instruction reads: for an 11-bit integer k,
// log2(k) = R(-k*2^-23) + k*2^-24 + 23 up to a negligible quadratic term, so
// `romlog_q` gives the LNS value of `romlog_k` in the same cycle.
//
// The use of a co-transformation ROM indexed by the low 11 bits, its
// R(z) = db(z) + log2(log2 e) contents, the ROMLOG formula and the two-cycle
// cost follow the machine description; the exact identity, the 12-bit high
// part table and the number formats are this design's choices.  ROM contents
// are computed during elaboration.
//
// Timing: z_o/base_o/sub_o are valid two enabled clocks after the inputs.
// romlog_q is combinational.  `en` = 0 freezes both stages.
module lns_cotrans
  import lns_pkg::*;
(
  input  logic               clk,
  input  logic               en,
  input  logic               apply,      // co-transform (db with |z| < 1)
  input  logic               sub,        // db (1) or sb (0) selected upstream
  input  logic signed [33:0] z,
  input  logic signed [35:0] base,
  output logic               sub_o,
  output logic signed [33:0] z_o,
  output logic signed [35:0] base_o,
  input  logic [10:0]        romlog_k,
  output word_t              romlog_q
);

  localparam int unsigned HI = FRAC - 11;                 // bits of a1: 12
  localparam real ULP = real'(1 << FRAC);
  localparam real LOG2E = 1.0 / $ln(2.0);
  localparam real KREAL = $ln(LOG2E) / $ln(2.0);          // log2(log2 e)
  localparam logic signed [35:0] K = 36'($rtoi(KREAL * ULP + 0.5));
  localparam logic signed [33:0] NEG_FAR = -34'sd1073741824;

  function automatic real fdb(real zz);
    return $ln(1.0 - $pow(2.0, zz)) / $ln(2.0);
  endfunction
  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  logic signed [27:0] rom_t1 [1 << HI];
  logic signed [31:0] rom_r  [1 << 11];

  assign rom_t1[0] = '0;
  assign rom_r[0]  = '0;
  for (genvar j = 1; j < (1 << HI); j++) begin : g_t1
    localparam real V = fdb(-real'(j) / real'(1 << HI));
    assign rom_t1[j] = 28'(rnd(V * ULP));
  end
  for (genvar k = 1; k < (1 << 11); k++) begin : g_r
    localparam real V = fdb(-real'(k) / ULP) + KREAL;
    assign rom_r[k] = 32'(rnd(V * ULP));
  end

  // ---------------------------------------------------------- stage 1
  logic               fold;
  logic signed [35:0] base_f;
  logic        [33:0] mag;
  logic [HI-1:0]      a1;
  logic [10:0]        a2, r_addr;
  logic signed [31:0] r_q;

  always_comb begin
    fold   = apply && (z > 0);
    base_f = fold ? base + 36'(z) : base;
    mag    = (z > 0) ? unsigned'(z) : unsigned'(-z);
    a1     = mag[FRAC-1:11];
    a2     = mag[10:0];
    r_addr = apply ? a2 : romlog_k;
    r_q    = rom_r[r_addr];
  end

  logic               s1_apply, s1_sub;
  logic signed [33:0] s1_z;
  logic signed [35:0] s1_base;
  logic signed [27:0] s1_t1;
  logic signed [31:0] s1_r;
  logic               s1_a1nz, s1_a2nz;
  logic [10:0]        s1_a2;

  always_ff @(posedge clk) begin
    if (en) begin
      s1_apply <= apply;
      s1_sub   <= sub;
      s1_z     <= z;
      s1_base  <= base_f;
      s1_t1    <= rom_t1[a1];
      s1_r     <= r_q;
      s1_a1nz  <= a1 != '0;
      s1_a2nz  <= a2 != '0;
      s1_a2    <= a2;
    end
  end

  // ---------------------------------------------------------- stage 2
  logic signed [35:0] db2;
  always_comb db2 = 36'(s1_r) - K;

  always_ff @(posedge clk) begin
    if (en) begin
      if (!s1_apply) begin
        sub_o  <= s1_sub;
        z_o    <= s1_z;
        base_o <= s1_base;
      end else begin
        sub_o <= 1'b0;                       // what remains is an sb(w)
        if (!s1_a1nz) begin
          z_o    <= NEG_FAR;
          base_o <= s1_base + db2;
        end else if (!s1_a2nz) begin
          z_o    <= NEG_FAR;
          base_o <= s1_base + 36'(s1_t1);
        end else begin
          z_o    <= 34'(36'(s1_t1) - db2 - 36'(s1_a2));
          base_o <= s1_base + db2;
        end
      end
    end
  end

  // ---------------------------------------------------------- ROMLOG
  logic signed [35:0] rl;
  logic        [11:0] khalf;               // Rb/2, rounded
  always_comb begin
    khalf    = 12'(romlog_k) + 12'd1;
    rl       = 36'(r_q) + 36'(khalf[11:1]) + 36'(23 << FRAC);
    romlog_q = (romlog_k == '0) ? LNS_ZERO : {1'b0, rl[LOGW-1:0]};
  end

endmodule
