// One output bin of an 8-point DFT, computed directly.
//
// Bin K of the transform is evaluated straight from its definition, without
// butterflies:
//   forward (INVERSE = 0):  X[K] = sum_n x[n] * exp(-j*2*pi*n*K/8)
//   inverse (INVERSE = 1):  y[K] = sum_n x[n] * exp(+j*2*pi*n*K/8) / 8
// The inputs are real. Each product uses a constant twiddle factor from
// ofdm_pkg (0, +-1 or +-181/256), so the multipliers reduce to shifts and adds
// after synthesis. The sum keeps full precision; the result is then divided by
// 2^(TW_FRAC+SHIFT) and cut to 8 bits. With ROUND_NEAREST = 0 the division
// truncates towards zero; with 1 it rounds to the nearest integer, halves away
// from zero. Results beyond the 8-bit range saturate.
//
// Interface: x[0:7] in, re and im out.
// Timing: purely combinational; the register in front of it (dft8_pass) is the
// only one of the transform.
//
// Computing every bin with its own direct formula follows the design, and so
// does leaving the path units without registers: the design's published
// resource counts for a transform (64 registers) are exactly the 8 x 8 bits of
// the shared input stage. The
// scaling by 1/8 of the inverse transform and the truncation towards zero were
// read off the design's published IFFT results; the precision of the twiddle
// factor, the saturation and the rounding option are this implementation's.
module dft8_path #(
  parameter int unsigned K             = 0, // output bin, 0..7
  parameter bit          INVERSE       = 1'b0,
  parameter int unsigned SHIFT         = 0, // extra right shift (3 = divide by 8)
  parameter bit          ROUND_NEAREST = 1'b0
) (
  input  ofdm_pkg::sample_t x [ofdm_pkg::NPT],
  output ofdm_pkg::sample_t re,
  output ofdm_pkg::sample_t im
);
  import ofdm_pkg::*;

  localparam int unsigned AW = 24;                 // accumulator width
  localparam int unsigned DS = TW_FRAC + SHIFT;    // total right shift

  typedef logic signed [AW-1:0] acc_t;

  // Scale a full-precision sum down to a saturated 8-bit sample.
  function automatic sample_t scale(input acc_t a);
    acc_t mag, q;
    mag = a[AW-1] ? -a : a;
    if (ROUND_NEAREST && DS > 0) mag = mag + (acc_t'(1) <<< (DS - 1));
    mag = mag >>> DS;
    q   = a[AW-1] ? -mag : mag;
    if (q > acc_t'(127))       return sample_t'(127);
    else if (q < acc_t'(-128)) return sample_t'(-128);
    else                       return sample_t'(q);
  endfunction

  acc_t acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int unsigned n = 0; n < NPT; n++) begin
      acc_re = acc_re + acc_t'(x[n]) * acc_t'(COS_Q[(n * K) % NPT]);
      if (INVERSE) acc_im = acc_im + acc_t'(x[n]) * acc_t'(SIN_Q[(n * K) % NPT]);
      else         acc_im = acc_im - acc_t'(x[n]) * acc_t'(SIN_Q[(n * K) % NPT]);
    end
  end

  assign re = scale(acc_re);
  assign im = scale(acc_im);

endmodule
