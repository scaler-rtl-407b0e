// tb_fp_util: reference conversions between IEEE single-precision bit
// patterns and real numbers, for the test benches. Subnormals are read and
// produced as zero, matching the flush-to-zero arithmetic of the design.
package tb_fp_util;

  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'h00) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    return f[31] ? -m : m;
  endfunction

  // round to nearest, ties to even
  function automatic logic [31:0] r2f(real v);
    logic s;
    int   e;
    real  a, m, fl;
    longint unsigned mi;
    if (v == 0.0) return 32'h0;
    s = v < 0.0;
    a = s ? -v : v;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m  = a * 8388608.0;
    mi = longint'($floor(m));
    fl = m - real'(mi);
    if (fl > 0.5 || (fl == 0.5 && mi[0])) mi++;
    if (mi >= 64'd16777216) begin mi = mi >> 1; e++; end
    if (e + 127 >= 255) return {s, 8'hFF, 23'h0};
    if (e + 127 <= 0)   return {s, 31'h0};
    return {s, 8'(e + 127), mi[22:0]};
  endfunction

  // random normal number with biased exponent in [elo, ehi]
  function automatic logic [31:0] rnd(int elo, int ehi);
    return {1'($urandom), 8'(elo + int'($urandom % 32'(ehi - elo + 1))), 23'($urandom)};
  endfunction

  // distance in units in the last place between two finite values of equal sign
  function automatic int ulp_diff(logic [31:0] a, logic [31:0] b);
    int d;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1000000;
    d = int'(a[30:0]) - int'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction

endpackage
