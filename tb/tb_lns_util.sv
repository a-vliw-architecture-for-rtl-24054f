// tb_lns_util: testbench helpers for the 32-bit LNS format (sign bit plus a
// two's-complement base-2 logarithm with 23 fraction bits; the most negative
// logarithm encodes zero).  Conversions use real arithmetic, independently of
// the design's ROMs and adders.
package tb_lns_util;

  localparam real ULP = 8388608.0;           // 2^23
  localparam logic [31:0] LZERO = 32'h4000_0000;

  function automatic logic [31:0] to_lns(real v);
    real l;
    longint q;
    if (v == 0.0) return LZERO;
    l = $ln(v < 0.0 ? -v : v) / $ln(2.0);
    q = (l >= 0.0) ? longint'($rtoi(l * ULP + 0.5)) : -longint'($rtoi(0.5 - l * ULP));
    if (q > 64'sd1073741823)  q = 64'sd1073741823;
    if (q < -64'sd1073741823) return LZERO;
    return {v < 0.0, q[30:0]};
  endfunction

  function automatic real lg(logic [31:0] w);   // log2 of the magnitude
    return real'(signed'(w[30:0])) / ULP;
  endfunction

  function automatic real from_lns(logic [31:0] w);
    real m;
    if (w[30:0] == LZERO[30:0]) return 0.0;
    m = $pow(2.0, lg(w));
    return w[31] ? -m : m;
  endfunction

  // distance of two LNS words in units of the last place of the logarithm;
  // a sign or zero mismatch counts as a huge distance
  function automatic longint ulp_dist(logic [31:0] a, logic [31:0] b);
    longint d;
    logic za, zb;
    za = (a[30:0] == LZERO[30:0]);
    zb = (b[30:0] == LZERO[30:0]);
    if (za || zb) return (za && zb) ? 0 : 64'd1 << 40;
    if (a[31] != b[31]) return 64'd1 << 40;
    d = longint'(signed'(a[30:0])) - longint'(signed'(b[30:0]));
    return d < 0 ? -d : d;
  endfunction

  // random LNS value with |log2| below lim
  function automatic logic [31:0] rnd_lns(real lim);
    real l;
    l = (real'($urandom) / 4294967296.0 * 2.0 - 1.0) * lim;
    return {1'($urandom), 31'($rtoi(l * ULP))};
  endfunction

endpackage
