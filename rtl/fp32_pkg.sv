// fp32_pkg: single-precision floating-point arithmetic used by the MAC and
// DIV units of the processing elements.
//
// The functions are combinational and synthesizable. Rounding is IEEE
// round-to-nearest-even. Subnormal inputs are read as zero and subnormal
// results are flushed to zero; an infinite or NaN input gives an infinity of
// the result's sign, and an overflow gives infinity. These simplifications are
// this implementation's choice: the design only states that single-precision
// values are used.
package fp32_pkg;

  typedef logic [31:0] f32_t;

  function automatic f32_t pack_round(input logic s, input int e,
                                      input logic [23:0] m, input logic g, input logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m};
    er = e;
    if (g && (st || m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 255) return {s, 8'hFF, 23'h0};
    if (er <= 0)   return {s, 31'h0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic f32_t fmul(input f32_t a, input f32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'h0};
    if (a[30:23] == 8'h00 || b[30:23] == 8'h00) return {s, 31'h0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return pack_round(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return pack_round(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic f32_t fadd(input f32_t a, input f32_t b);
    f32_t        x, y;
    logic [49:0] mx, my, sh;
    logic [50:0] sum;
    int          d, p;
    logic        st;
    logic [50:0] n;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (b[30:23] == 8'h00) return (a[30:23] == 8'h00) ? 32'h0 : a;
    if (a[30:23] == 8'h00) return b;
    // x has the larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    mx = {1'b1, x[22:0], 26'h0};
    my = {1'b1, y[22:0], 26'h0};
    d  = int'(x[30:23]) - int'(y[30:23]);
    if (d > 49) begin
      sh = 50'h0;
      st = 1'b1;
    end else begin
      sh = my >> d;
      st = (my & ((50'h1 << d) - 50'h1)) != 50'h0;
    end
    sh[0] = sh[0] | st;
    if (x[31] == y[31]) sum = {1'b0, mx} + {1'b0, sh};
    else                sum = {1'b0, mx} - {1'b0, sh};
    if (sum == 51'h0) return 32'h0;
    p = 0;
    for (int i = 0; i <= 50; i++) if (sum[i]) p = i;
    n = sum << (50 - p);
    return pack_round(x[31], int'(x[30:23]) + p - 49, n[50:27], n[26], |n[25:0]);
  endfunction

  function automatic f32_t fsub(input f32_t a, input f32_t b);
    return fadd(a, {~b[31], b[30:0]});
  endfunction

  function automatic f32_t fdiv(input f32_t a, input f32_t b);
    logic        s;
    logic [49:0] num, q, r;
    logic [23:0] den;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'h00) return {s, 8'hFF, 23'h0};
    if (a[30:23] == 8'h00 || b[30:23] == 8'hFF) return {s, 31'h0};
    num = {1'b1, a[22:0], 26'h0};
    den = {1'b1, b[22:0]};
    q   = num / {26'h0, den};
    r   = num % {26'h0, den};
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[26]) return pack_round(s, e,     q[26:3], q[2], (|q[1:0]) || (r != 50'h0));
    else       return pack_round(s, e - 1, q[25:2], q[1], q[0] || (r != 50'h0));
  endfunction

  // |a| < 2^(thr_exp-127), i.e. the biased exponent is below thr_exp
  function automatic logic is_tiny(input f32_t a, input logic [7:0] thr_exp);
    return a[30:23] < thr_exp;
  endfunction

endpackage
