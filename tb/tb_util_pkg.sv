// Helpers shared by the testbenches: square-root raised-cosine taps computed
// with real arithmetic, quantized to Q1.15 with unit DC gain.
package tb_util_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Continuous SRRC impulse response at time t (in symbols), roll-off a.
  function automatic real srrc(real t, real a);
    if (t == 0.0) return 1.0 - a + 4.0*a/PI;
    if (rabs(rabs(4.0*a*t) - 1.0) < 1e-9)
      return a/$sqrt(2.0) * ((1.0+2.0/PI)*$sin(PI/(4.0*a)) + (1.0-2.0/PI)*$cos(PI/(4.0*a)));
    return ($sin(PI*t*(1.0-a)) + 4.0*a*t*$cos(PI*t*(1.0+a))) / (PI*t*(1.0-(4.0*a*t)*(4.0*a*t)));
  endfunction

  // Tap i of an ntaps-long SRRC at sps samples per symbol, Q1.15, sum ~ 32768.
  function automatic int srrc_tap(int i, int ntaps, real a, real sps);
    real sum;
    sum = 0.0;
    for (int k = 0; k < ntaps; k++) sum += srrc((real'(k) - real'(ntaps-1)/2.0) / sps, a);
    return int'($floor(32768.0 * srrc((real'(i) - real'(ntaps-1)/2.0) / sps, a) / sum + 0.5));
  endfunction
endpackage
