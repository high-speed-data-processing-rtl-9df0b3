// tb_fx_pkg: helpers shared by the testbenches: conversion between real
// numbers and the Q15.16 fixed-point format of the design, and a tolerance
// compare that counts checks and failures.
package tb_fx_pkg;
  import pid_pkg::*;

  function automatic fx_t to_fx(real r);
    return fx_t'($rtoi(r * 65536.0 + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic real fx_r(fx_t v);
    return $itor(v) / 65536.0;
  endfunction

  function automatic real rabs(real r);
    return r < 0 ? -r : r;
  endfunction

  // Reference PID in real arithmetic (same formulas as the design):
  // beta = lc/tof, A/Q = brho*sqrt(1-beta^2)*inv_k/beta,
  // Z = zc0*beta*sqrt(de/(ln(ionpair*beta^2/(1-beta^2)) - beta^2)) + zc1.
  function automatic void pid_ref(real b35, real b57, real tof, real de,
                                  real lc, real inv_k, real w35, real ln_ip,
                                  real zc0, real zc1, output real aoq, output real z);
    real brho, beta, b2, dev;
    brho = b57 + w35 * (b35 - b57);
    beta = lc / tof;
    b2   = beta * beta;
    dev  = $ln(b2 / (1.0 - b2)) + ln_ip - b2;
    aoq  = brho * $sqrt(1.0 - b2) * inv_k / beta;
    z    = zc0 * beta * $sqrt(de / dev) + zc1;
  endfunction

  // Inverse used to generate events: the inputs that give a wanted A/Q and Z
  // for a given beta (with brho35 = brho57 = brho).
  function automatic void pid_gen(real aoq, real z, real beta,
                                  real lc, real inv_k, real ln_ip, real zc0, real zc1,
                                  output real brho, output real tof, output real de);
    real b2, dev, r;
    b2   = beta * beta;
    dev  = $ln(b2 / (1.0 - b2)) + ln_ip - b2;
    brho = aoq * beta / ($sqrt(1.0 - b2) * inv_k);
    tof  = lc / beta;
    r    = (z - zc1) / (zc0 * beta);
    de   = r * r * dev;
  endfunction
endpackage
