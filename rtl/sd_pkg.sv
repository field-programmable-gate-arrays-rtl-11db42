// sd_pkg - number formats shared by the noise standard-deviation estimators.
//
// Samples are signed fixed point with 15 bits in all and 8 fractional bits
// (the 15/8 format the estimators are specified for). Every estimator reports
// its estimate as an unsigned 16-bit value with the same 8 fractional bits, so
// the three outputs can be compared directly and against a sample.
package sd_pkg;
  localparam int unsigned DATA_W  = 15;  // sample width
  localparam int unsigned FRAC_W  = 8;   // fractional bits of samples and estimates
  localparam int unsigned SIGMA_W = 16;  // estimate width (unsigned)

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [SIGMA_W-1:0] sigma_t;

  // Magnitude of a sample; the most negative sample (-64.0) maps to 64.0,
  // which still fits in DATA_W unsigned bits.
  function automatic logic [DATA_W-1:0] sample_abs(sample_t x);
    return x[DATA_W-1] ? DATA_W'(-x) : DATA_W'(x);
  endfunction
endpackage
