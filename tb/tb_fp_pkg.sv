// tb_fp_pkg: testbench helpers for single-precision values: conversion of a
// bit pattern to a real number (independent of the design), random operands,
// and a relative-error comparison.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    for (int i = 127; i < int'(f[30:23]); i++) m = m * 2.0;
    for (int i = int'(f[30:23]); i < 127; i++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  // random normal float with exponent in 127 +- span
  function automatic logic [31:0] rand_f(input int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(0, 2*span)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // true when got is within tol_ulps units of 2^-23 of exact (relative)
  function automatic bit close(input real got, input real exact, input real tol_ulps);
    real err, lim;
    err = got - exact; if (err < 0) err = -err;
    lim = (exact < 0 ? -exact : exact) * tol_ulps / 8388608.0;
    return err <= lim + 1.0e-30;
  endfunction
endpackage
