// ifv_ref_pkg: reference models used by the testbenches.
//
// julia_k  breakaway count of one point, computed the way the number
//          format prescribes: each 36 x 36 product is floored to Q6.30
//          separately, sums wrap at 36 bits, and the escape test adds the two
//          squares, each floored to 30 fraction bits but not wrapped.
// julia_k_real  the same count in double precision, for tolerance checks.
// rand_fix uniform random fixed-point value in a power-of-two range.
// dc_value value of a differential counter after n steps (leap rule: a step
//          taken while the leap counter equals the leap interval adds one
//          extra LSB and clears the counter).
//
// The arithmetic it models (Q6.30, z^2 + c, escape at |z|^2 > 4, the leap
// rule) follows the design; writing it as plain loops over integers and
// reals, independent of the RTL's structure, is its own.
package ifv_ref_pkg;

  function automatic logic signed [35:0] fx_mul(input logic signed [35:0] x,
                                                input logic signed [35:0] y);
    logic signed [71:0] p;
    p = 72'(x) * 72'(y);
    return 36'(p >>> 30);
  endfunction

  function automatic int julia_k(input logic signed [35:0] a0,
                                 input logic signed [35:0] b0,
                                 input logic signed [35:0] cr,
                                 input logic signed [35:0] ci,
                                 input int max_it);
    logic signed [35:0] a, b, ta;
    logic signed [71:0] sa, sb;
    a = a0;
    b = b0;
    for (int n = 0; n < max_it; n++) begin
      sa = 72'(a) * 72'(a);
      sb = 72'(b) * 72'(b);
      if ((sa >>> 30) + (sb >>> 30) > (72'sd4 <<< 30)) return n;
      ta = fx_mul(a, a) - fx_mul(b, b) + cr;
      b  = 36'(fx_mul(a, b) * 2) + ci;
      a  = ta;
    end
    return max_it;
  endfunction

  // uniform random Q6.30 value in [-2^(1-shift), 2^(1-shift))
  function automatic logic signed [35:0] rand_fix(input int shift);
    logic [31:0] r;
    logic signed [35:0] v;
    r = $urandom;
    v = {{4{r[31]}}, r};
    return v >>> shift;
  endfunction

  function automatic real to_real(input logic signed [35:0] v);
    return real'(v) / real'(64'd1 << 30);
  endfunction

  function automatic int julia_k_real(input real a0, input real b0,
                                      input real cr, input real ci,
                                      input int max_it);
    real a, b, t;
    a = a0;
    b = b0;
    for (int n = 0; n < max_it; n++) begin
      if (a*a + b*b > 4.0) return n;
      t = a*a - b*b + cr;
      b = 2.0*a*b + ci;
      a = t;
    end
    return max_it;
  endfunction

  function automatic logic signed [35:0] dc_value(input logic signed [35:0] vmin,
                                                  input logic signed [35:0] vdiff,
                                                  input int leap, input int n);
    logic signed [35:0] v;
    int cnt;
    v = vmin;
    cnt = 0;
    for (int i = 0; i < n; i++) begin
      if (cnt == leap) begin v = v + vdiff + 1; cnt = 0; end
      else begin v = v + vdiff; cnt++; end
    end
    return v;
  endfunction

endpackage
