// tb_util_pkg - helpers shared by the estimator testbenches.
//
// gauss_sample() draws a zero-mean Gaussian value (Box-Muller on $urandom)
// with standard deviation sigma and returns it as a 15-bit sample with 8
// fractional bits, rounded and clipped to the sample range.
package tb_util_pkg;
  function automatic real uniform01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss(real sigma);
    real u1, u2;
    u1 = uniform01();
    u2 = uniform01();
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic logic signed [14:0] to_sample(real v);
    real s;
    s = v * 256.0;
    if (s > 16383.0) s = 16383.0;
    if (s < -16384.0) s = -16384.0;
    return 15'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic logic signed [14:0] gauss_sample(real sigma);
    return to_sample(gauss(sigma));
  endfunction
endpackage
