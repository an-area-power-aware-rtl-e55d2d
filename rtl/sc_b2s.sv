// sc_b2s: binary-to-stochastic converter.
//
// The sign-inversion stage turns a signed two's-complement input into a sign
// bit and a MAG_W-bit magnitude (the most negative code is clamped to the
// largest magnitude, this design's choice). The top n bits of the magnitude,
// m, are compared with the LFSR value r (1 .. 2^n - 1): the stream bit is
// (m >= r). Over one full LFSR period of N_sto = 2^n - 1 cycles every r
// value appears once, so the stream holds exactly m ones: the value is
// m / N_sto ~ |x| / 2^MAG_W. The comparison with an LFSR value and the
// separate sign bit follow the reference design; using the top n bits when
// n < MAG_W (shorter streams, lower accuracy) is this design's choice.
// Combinational; the caller holds `x` for the whole operation.
module sc_b2s
  import gc_pkg::*;
(
  input  sample_t x,       // signed binary input
  input  nsel_t   n,       // LFSR width in use
  input  rnd_t    rnd,     // LFSR value
  output logic    s_bit,   // stochastic stream bit of |x|
  output logic    s_sign   // sign bit (1 = negative)
);

  mag_t mag, m_top;

  always_comb begin
    // sign inversion
    s_sign = x[SIG_W-1];
    if (x == sample_t'(-(1 << MAG_W))) mag = '1;
    else if (s_sign)                   mag = mag_t'(-x);
    else                               mag = mag_t'(x);
    // comparison with the random value
    m_top = mag >> (nsel_t'(MAG_W) - n);
    s_bit = (m_top >= rnd);
  end

endmodule
