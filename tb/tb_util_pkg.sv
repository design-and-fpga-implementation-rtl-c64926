// Helpers shared by the testbenches: conversion between real numbers and
// the Q16.16 / Q2.30 words of the design, and floating-point reference
// models of the self-tuning filter and the PI controller, written from
// their continuous-time equations rather than from the RTL.
package tb_util_pkg;
  import sapf_pkg::*;

  localparam real PI_R = 3.14159265358979323846;

  function automatic fix_t r2f(input real r);
    return fix_t'($rtoi(r * 65536.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real f2r(input fix_t f);
    return real'(f) / 65536.0;
  endfunction

  function automatic real c2r(input coef_t c);
    return real'(c) / 1073741824.0;
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // Self-tuning filter dy/dt = K (x - y) + j w y, stepped once per sample
  // as a correction K*Ts*(x - y) followed by the rotation exp(j w Ts).
  class stf_model;
    real ya, yb;     // state, prediction for the next sample
    real oa, ob;     // corrected estimate of the last sample
    real kts, wts;
    function new(real k, real w, real ts);
      ya = 0.0; yb = 0.0; oa = 0.0; ob = 0.0;
      kts = k * ts; wts = w * ts;
    endfunction
    function void step(real xa, real xb);
      real ua, ub;
      ua = ya + kts * (xa - ya);
      ub = yb + kts * (xb - yb);
      oa = ua; ob = ub;
      ya = $cos(wts) * ua - $sin(wts) * ub;
      yb = $sin(wts) * ua + $cos(wts) * ub;
    endfunction
  endclass

  // PI controller on e = vref - udc with the integral and output limited.
  class pi_model;
    real acc, u, kp, kits, umax;
    bit  sat;
    function new(real kp_i, real kits_i, real umax_i);
      acc = 0.0; u = 0.0; sat = 0;
      kp = kp_i; kits = kits_i; umax = umax_i;
    endfunction
    function void step(real udc, real vref);
      real e, s;
      e   = vref - udc;
      acc = acc + kits * e;
      if (acc > umax) acc = umax;
      if (acc < -umax) acc = -umax;
      s   = kp * e + acc;
      sat = 0;
      if (s > umax)  begin s = umax;  sat = 1; end
      if (s < -umax) begin s = -umax; sat = 1; end
      u = s;
    endfunction
  endclass

endpackage
