// lns_interp: two-stage linear interpolator for the LNS addition functions
//   sb(z) = log2(1 + 2^z)   (addition logarithm, operands of equal sign)
//   db(z) = log2|1 - 2^z|   (subtraction logarithm, operands of unequal sign)
//
// Structure (after the published interpolator figure): the magnitude |z| is
// partitioned into high bits zH and low bits zL.  zH addresses a function ROM
// F(zH) and a slope ROM C(zH); both outputs and zL are captured in the first
// pipeline register.  The second stage forms F(zH) + C(zH)*zL with an integer
// multiplier and an adder and captures it in the second pipeline register.
//
// Design choices (not given by the source): z and the result are signed
// fixed-point numbers with 23 fraction bits.  zH covers |z| < 2^ZI with ZF
// fraction bits (2^(ZI+ZF) ROM words per function); beyond that both
// functions are taken as 0, which is below the resolution of the format.
// Positive z is folded: F(z) = z + F(-z) holds for sb and db alike, so the ROM
// holds only z <= 0 and stage 2 adds z back.  The slope is the secant over one
// ROM interval, stored with CS fraction bits.  The ROM contents are computed
// during elaboration from the formulas above.  db is only accurate for
// |z| >= 1; the processor routes smaller differences through the
// co-transformation stages first.
//
// Timing: `f` is valid two enabled clocks after `z`/`sub` are presented;
// `en` = 0 freezes both pipeline registers.
module lns_interp
  import lns_pkg::*;
#(
  parameter int unsigned ZI = 5,    // integer bits of |z| covered by the ROMs
  parameter int unsigned ZF = 7,    // fraction bits of zH
  parameter int unsigned CS = 20    // fraction bits of the stored slope
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [33:0]  z,
  input  logic                sub,     // 1: db, 0: sb
  output logic signed [33:0]  f
);

  localparam int unsigned N   = 1 << (ZI + ZF);
  localparam int unsigned LOW = FRAC - ZF;           // width of zL
  localparam real         ULP = real'(1 << FRAC);

  function automatic real fsb(real zz);
    return $ln(1.0 + $pow(2.0, zz)) / $ln(2.0);
  endfunction
  function automatic real fdb(real zz);
    return $ln(1.0 - $pow(2.0, zz)) / $ln(2.0);
  endfunction
  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction
  // z of ROM word i; word 0 of db (the singularity) uses half an interval
  function automatic real zpt(int i, bit db);
    return (db && i == 0) ? -0.5 / real'(1 << ZF) : -real'(i) / real'(1 << ZF);
  endfunction

  logic signed [27:0] rom_f [2][N];
  logic signed [23:0] rom_c [2][N];

  for (genvar i = 0; i < int'(N); i++) begin : g_rom
    localparam real SB0 = fsb(zpt(i, 1'b0));
    localparam real SB1 = fsb(zpt(i + 1, 1'b0));
    localparam real DB0 = fdb(zpt(i, 1'b1));
    localparam real DB1 = fdb(zpt(i + 1, 1'b1));
    assign rom_f[0][i] = 28'(rnd(SB0 * ULP));
    assign rom_f[1][i] = 28'(rnd(DB0 * ULP));
    assign rom_c[0][i] = 24'(rnd((SB1 - SB0) * real'(1 << CS) * real'(1 << ZF)));
    assign rom_c[1][i] = 24'(rnd((DB1 - DB0) * real'(1 << CS) * real'(1 << ZF)));
  end

  // ---------------------------------------------------------- partitioning
  logic               pos;
  logic        [33:0] mag;
  logic               far;
  logic [ZI+ZF-1:0]   zh;
  logic [LOW-1:0]     zl;

  always_comb begin
    pos = (z > 0);
    mag = pos ? unsigned'(z) : unsigned'(-z);
    far = (mag >> (ZI + FRAC)) != 0;
    zh  = mag[FRAC+ZI-1 : LOW];
    zl  = mag[LOW-1:0];
  end

  // ---------------------------------------------------------- stage 1: ROM
  logic signed [27:0] s1_f;
  logic signed [23:0] s1_c;
  logic [LOW-1:0]     s1_zl;
  logic signed [33:0] s1_zadd;

  always_ff @(posedge clk) begin
    if (en) begin
      s1_f    <= far ? '0 : rom_f[sub][zh];
      s1_c    <= far ? '0 : rom_c[sub][zh];
      s1_zl   <= zl;
      s1_zadd <= pos ? z : '0;
    end
  end

  // ---------------------------------------------------------- stage 2: mul/add
  logic signed [47:0] prod;
  always_comb prod = 48'(s1_c) * 48'(signed'({1'b0, s1_zl}));

  always_ff @(posedge clk) begin
    if (en) f <= 34'(s1_f) + 34'(prod >>> CS) + s1_zadd;
  end

endmodule
