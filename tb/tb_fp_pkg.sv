// tb_fp_pkg: real-number helpers for the collision testbenches.
//
// Converts between IEEE-754 single-precision bit patterns and real values
// without relying on the simulator's shortreal support, and compares a
// float result with a real reference within a relative tolerance.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    for (int i = 127; i < int'(f[30:23]); i++) m = m * 2.0;
    for (int i = int'(f[30:23]); i < 127; i++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic s; int e; real a;
    s = r < 0.0; a = s ? -r : r;
    if (a == 0.0) return 32'd0;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return {s, 8'(e + 127), 23'($rtoi((a - 1.0) * 8388608.0))};
  endfunction

  function automatic bit close(input logic [31:0] got, input real exp);
    real g, tol;
    g = f2r(got);
    tol = (exp < 0 ? -exp : exp) * 3.9e-6 + 1e-6;
    return !((g - exp > tol) || (exp - g > tol));
  endfunction
endpackage
