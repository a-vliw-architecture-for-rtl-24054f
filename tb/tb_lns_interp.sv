// tb_lns_interp: self-checking test of the two-stage LNS interpolator.
// Streams random arguments (one per clock, with occasional freeze cycles)
// for sb(z) = log2(1 + 2^z) over |z| < 40 and db(z) = log2|1 - 2^z| over
// 1 <= |z| < 40, and compares each result, two enabled clocks later, with the
// real-valued function.  The allowed error is the linear-interpolation bound
// (interval^2 / 8 times the second derivative at the interval end nearer
// zero) plus 3 units in the last place for rounding.
module tb_lns_interp;
  import tb_lns_util::*;

  localparam int ZF = 7;
  localparam real DZ = 1.0 / 128.0;

  logic clk = 0, en;
  logic signed [33:0] z, f;
  logic sub;
  int checks = 0, failures = 0;
  real maxerr_sb = 0.0, maxerr_db = 0.0;

  lns_interp #(.ZI(5), .ZF(ZF), .CS(20)) dut (.clk, .en, .z, .sub, .f);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fref(real zz, bit s);
    real m;
    m = s ? $ln(1.0 - $pow(2.0, zz)) : $ln(1.0 + $pow(2.0, zz));
    return m / $ln(2.0);
  endfunction

  function automatic real tol(real zz, bit s);
    real u, p, f2;
    u = -$floor((zz < 0 ? -zz : zz) / DZ) * DZ;
    p = $pow(2.0, u);
    f2 = s ? $ln(2.0) * p / ((1.0 - p) * (1.0 - p)) : $ln(2.0) * p / ((1.0 + p) * (1.0 + p));
    return 3.0 + DZ * DZ / 8.0 * f2 * ULP;
  endfunction

  function automatic logic signed [33:0] rnd_z(bit s);
    real v;
    do v = (real'($urandom) / 4294967296.0 * 2.0 - 1.0) * 40.0;
    while (s && (v > -1.0 && v < 1.0));
    return 34'($rtoi(v * ULP));
  endfunction

  logic signed [33:0] zq [$];
  logic sq [$];

  initial begin
    en = 0; z = '0; sub = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      sub = 1'($urandom);
      z   = rnd_z(sub);
      if (i < 2) begin z = 34'sd0; sub = 0; end
      else if (i < 4) z = (i == 2) ? -34'sd8388608 : 34'sd8388608;
      en  = ($urandom_range(0, 9) != 0);
      @(posedge clk);
      if (en) begin
        zq.push_back(z);
        sq.push_back(sub);
      end
      @(negedge clk);
      if (en && zq.size() == 2) begin
        logic signed [33:0] z0;
        bit s0;
        real r, e;
        z0 = zq.pop_front();
        s0 = sq.pop_front();
        r = fref(real'(z0) / ULP, s0);
        e = real'(f) - r * ULP;
        if (e < 0) e = -e;
        if (s0) begin if (e > maxerr_db) maxerr_db = e; end
        else    begin if (e > maxerr_sb) maxerr_sb = e; end
        checks++;
        if (e > tol(real'(z0) / ULP, s0)) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH z=%f sub=%0d got=%0d want=%f", real'(z0) / ULP, s0, f, r * ULP);
        end
      end
    end
    $display("max error sb=%f db=%f ulp", maxerr_sb, maxerr_db);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
