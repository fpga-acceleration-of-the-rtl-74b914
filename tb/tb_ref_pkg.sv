// tb_ref_pkg: reference models used by the testbenches, written from the
// equations of the design rather than from its RTL.
package tb_ref_pkg;
  import hs_pkg::*;

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic longint satv(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  // One H&S iteration on one pixel given the neighbour increments.
  // Returns {u', v'} as longints through the output arguments.
  task automatic hs_update(input longint ix, iy, it, un, us, ue, uw, vn, vs, ve, vw,
                           input longint alpha2, output longint u1, output longint v1);
    longint ub, vb, num, den, an, r, pu, pv;
    ub  = (un + us + ue + uw) >>> 2;
    vb  = (vn + vs + ve + vw) >>> 2;
    num = ix * ub + iy * vb + it * 256;
    den = alpha2 * 256 + ix * ix + iy * iy;
    an  = (num < 0) ? -num : num;
    r   = (an * 256) / den;
    if (num < 0) r = -r;
    pu  = (ix * r) >>> 8;
    pv  = (iy * r) >>> 8;
    u1  = satv(ub - pu);
    v1  = satv(vb - pv);
  endtask

  // Keys cubic kernel (a = -1/2) weights for fraction t in [0,1).
  function automatic real keys_w(input int k, input real t);
    case (k)
      0: return (-t*t*t + 2.0*t*t - t) / 2.0;
      1: return (3.0*t*t*t - 5.0*t*t + 2.0) / 2.0;
      2: return (-3.0*t*t*t + 4.0*t*t + t) / 2.0;
      default: return (t*t*t - t*t) / 2.0;
    endcase
  endfunction
endpackage
