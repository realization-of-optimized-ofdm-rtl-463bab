// Shared types and constants of the 8-point OFDM datapath.
//
// Samples are 8-bit two's-complement integers, eight of them make one OFDM
// symbol. The transforms multiply by the eight roots of unity; their real and
// imaginary parts take only the values 0, +-1 and +-cos(pi/4), so each is held
// here as a signed fixed-point integer with TW_FRAC fraction bits
// (cos(pi/4) = 0.70711 ~ 181/256 = 0.70703). The coefficient tables follow
//   COS_Q[m] = round(2^TW_FRAC * cos(2*pi*m/8)),
//   SIN_Q[m] = round(2^TW_FRAC * sin(2*pi*m/8)),   m = 0..7.
// The point count and the sample width are the design's; the fixed-point
// precision of the twiddle factor is this implementation's choice.
package ofdm_pkg;

  localparam int unsigned NPT     = 8;   // transform length
  localparam int unsigned SW      = 8;   // sample width
  localparam int unsigned TW_FRAC = 8;   // fraction bits of a twiddle factor
  localparam int signed   TW_ONE  = 256; // 1.0
  localparam int signed   TW_C    = 181; // cos(pi/4)

  typedef logic signed [SW-1:0] sample_t;

  typedef int signed coef_tab_t [NPT];

  // Real part of exp(+j*2*pi*m/8), scaled by 2^TW_FRAC, indexed by m.
  localparam coef_tab_t COS_Q = '{TW_ONE, TW_C, 0, -TW_C, -TW_ONE, -TW_C, 0, TW_C};
  // Imaginary part of exp(+j*2*pi*m/8), scaled by 2^TW_FRAC, indexed by m.
  localparam coef_tab_t SIN_Q = '{0, TW_C, TW_ONE, TW_C, 0, -TW_C, -TW_ONE, -TW_C};

endpackage
