// tb_util_pkg: helpers shared by the testbenches.
//
// Conversions between IEEE-754 single-precision bit patterns and real numbers
// (written out by hand so that they do not depend on simulator support for
// shortreal), a reference DFT in double precision, and a small complex type.
package tb_util_pkg;

  typedef struct {
    real re;
    real im;
  } creal_t;

  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  // round to nearest (ties away from zero); exact for values already representable
  function automatic logic [31:0] r2f(real x);
    real    v;
    int     e;
    longint m;
    logic   s;
    if (x == 0.0) return 32'h0;
    s = x < 0.0;
    v = s ? -x : x;
    e = 0;
    while (v >= 2.0) begin v = v / 2.0; e++; end
    while (v < 1.0)  begin v = v * 2.0; e--; end
    m = longint'($floor((v - 1.0) * 8388608.0 + 0.5));
    if (m >= 64'd8388608) begin m = 0; e++; end
    if (e + 127 <= 0) return {s, 31'd0};
    return {s, 8'(e + 127), m[22:0]};
  endfunction

  // units in the last place between two single-precision numbers of the same sign
  function automatic longint ulp_diff(logic [31:0] a, logic [31:0] b);
    longint ia, ib;
    ia = a[31] ? -longint'(a[30:0]) : longint'(a[30:0]);
    ib = b[31] ? -longint'(b[30:0]) : longint'(b[30:0]);
    return (ia > ib) ? ia - ib : ib - ia;
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real cabs(creal_t z);
    return $sqrt(z.re * z.re + z.im * z.im);
  endfunction

endpackage
