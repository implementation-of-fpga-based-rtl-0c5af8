// pid_ref_pkg: reference model of the incremental PID arithmetic for the
// testbenches, written with 64-bit integers independently of the RTL.
// Widths are those of pid_pkg's defaults.
package pid_ref_pkg;

  // Error e = Pd - a*s, wrapped to 24 bits (two's complement).
  function automatic longint ref_err(longint a, longint s, longint pd);
    logic signed [23:0] t;
    t = 24'(pd - a * s);
    return longint'(t);
  endfunction

  // E = k0 e0 + k1 e1 + k2 e2 (exact).
  function automatic longint ref_incr(longint k0, longint k1, longint k2,
                                      longint e0, longint e1, longint e2);
    return k0 * e0 + k1 * e1 + k2 * e2;
  endfunction

  // Wrap to the 48-bit output word.
  function automatic longint wrap48(longint x);
    logic signed [47:0] t;
    t = 48'(x);
    return longint'(t);
  endfunction

  function automatic longint clamp(longint x, longint lo, longint hi);
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

endpackage
