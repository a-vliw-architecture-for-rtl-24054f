// tb_lns_cotrans: self-checking test of the co-transformation stages and the
// ROMLOG conversion.  For random 0 < |z| < 1 it checks, two enabled clocks
// later, that base_o + sb(z_o), computed with real arithmetic, equals
// base + db(z) = base + log2|1 - 2^z| to within 4 units in the last place,
// and that the remaining function is marked as sb.  With `apply` low the
// stages must return their inputs unchanged.  ROMLOG results for every 11-bit
// integer must match log2(k) to within 2 units in the last place, and k = 0
// must give the zero code.
module tb_lns_cotrans;
  import tb_lns_util::*;
  import lns_pkg::*;

  logic clk = 0, en, apply, sub, sub_o;
  logic signed [33:0] z, z_o;
  logic signed [35:0] base, base_o;
  logic [10:0] romlog_k;
  logic [31:0] romlog_q;
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  lns_cotrans dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic signed [33:0] z; logic signed [35:0] b; logic a; logic s; } in_t;
  in_t q [$];

  function automatic real sbr(real w);
    return $ln(1.0 + $pow(2.0, w)) / $ln(2.0);
  endfunction

  initial begin
    en = 0; apply = 0; sub = 0; z = '0; base = '0; romlog_k = '0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      in_t t;
      t.a = ($urandom_range(0, 3) != 0);
      t.s = t.a ? 1'b1 : 1'($urandom);
      do t.z = 34'(signed'(32'($urandom_range(0, 16777214)) - 32'sd8388607));
      while (t.z == 0);
      if (i == 0) t.z = -34'sd2048;         // high part zero
      if (i == 1) t.z = -34'sd4096 * 34'sd2; // low part zero
      t.b = 36'($urandom_range(0, 200000000)) - 36'sd100000000;
      apply = t.a; sub = t.s; z = t.z; base = t.b;
      en = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      if (en) q.push_back(t);
      @(negedge clk);
      if (en && q.size() == 2) begin
        in_t o;
        o = q.pop_front();
        checks++;
        if (!o.a) begin
          if (z_o !== o.z || base_o !== o.b || sub_o !== o.s) begin
            failures++;
            $display("PASS-THROUGH MISMATCH");
          end
        end else begin
          real want, got, e, zr;
          zr   = real'(o.z) / ULP;
          want = real'(o.b) + ULP * $ln(zr > 0 ? $pow(2.0, zr) - 1.0 : 1.0 - $pow(2.0, zr)) / $ln(2.0);
          got  = real'(base_o) + ULP * sbr(real'(z_o) / ULP);
          e = got - want;
          if (e < 0) e = -e;
          if (e > maxerr) maxerr = e;
          if (e > 4.0 || sub_o !== 1'b0) begin
            failures++;
            if (failures < 10) $display("MISMATCH z=%0d got=%f want=%f", o.z, got, want);
          end
        end
      end
    end
    // ROMLOG, exhaustive
    apply = 0;
    for (int k = 0; k < 2048; k++) begin
      romlog_k = 11'(k);
      #1;
      checks++;
      if (k == 0) begin
        if (romlog_q !== LNS_ZERO) failures++;
      end else if (ulp_dist(romlog_q, to_lns(real'(k))) > 2) begin
        failures++;
        if (failures < 10) $display("ROMLOG k=%0d got=%h want=%h", k, romlog_q, to_lns(real'(k)));
      end
    end
    $display("max co-transformation error %f ulp", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
