// tb_util_pkg: small helpers shared by the testbenches (fixed-point conversion
// and absolute value of reals).
package tb_util_pkg;
  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real q2r(input logic signed [31:0] v, input int frac);
    return real'(v) / (2.0 ** frac);
  endfunction
  function automatic logic signed [31:0] r2q(input real x, input int frac);
    return 32'($rtoi(x * (2.0 ** frac)));
  endfunction
endpackage
