// tb_ref_pkg: reference arithmetic shared by the testbenches.
//
// Plain integer models of the neural computation, independent of the RTL:
// the staircase evaluation function, floor division and non-negative
// residue, and a random-number helper.
package tb_ref_pkg;

  // number of thresholds reached by s (staircase evaluation function)
  function automatic longint stair(longint s, longint t0, longint t1, longint t2);
    return longint'(s >= t0) + longint'(s >= t1) + longint'(s >= t2);
  endfunction

  function automatic longint fmod(longint v, longint d);
    longint r = v % d;
    if (r < 0) r += d;
    return r;
  endfunction

  function automatic longint fdiv(longint v, longint d);
    return (v - fmod(v, d)) / d;
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

endpackage
