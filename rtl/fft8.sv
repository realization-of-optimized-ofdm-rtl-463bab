// 8-point FFT of the OFDM receiver.
//
// Turns eight real time-domain samples into eight complex frequency-domain
// samples, X[k] = sum_n in_x[n] * exp(-j*2*pi*n*k/8). As in the design it is
// built from a common input register (U_pass) and eight path units, one per
// output, each evaluating its output directly from the formula instead of
// through radix-2 butterfly stages. Because the inputs are real, outputs 0 and
// 4 are real and only outim1, 2, 3, 5, 6 and 7 exist.
//
// Interface: CLOCK, synchronous active-high reset, in_x0..in_x7 (8-bit signed),
// outre0..outre7 and outim1..outim7 (8-bit signed).
// Timing: one clock of latency: the inputs are registered in U_pass and the
// path units are combinational; a new symbol can be accepted on every clock.
//
// The port names and the pass-plus-paths structure follow the design. The
// scaling is this implementation's choice: by default (SHIFT = 0) the forward
// transform is not scaled, which undoes the 1/8 of the transmitter's inverse
// transform, and results outside -128..127 saturate.
module fft8 #(
  parameter int unsigned SHIFT         = 0,
  parameter bit          ROUND_NEAREST = 1'b0
) (
  input  logic              CLOCK,
  input  logic              reset,
  input  ofdm_pkg::sample_t in_x0,
  input  ofdm_pkg::sample_t in_x1,
  input  ofdm_pkg::sample_t in_x2,
  input  ofdm_pkg::sample_t in_x3,
  input  ofdm_pkg::sample_t in_x4,
  input  ofdm_pkg::sample_t in_x5,
  input  ofdm_pkg::sample_t in_x6,
  input  ofdm_pkg::sample_t in_x7,
  output ofdm_pkg::sample_t outre0,
  output ofdm_pkg::sample_t outre1,
  output ofdm_pkg::sample_t outre2,
  output ofdm_pkg::sample_t outre3,
  output ofdm_pkg::sample_t outre4,
  output ofdm_pkg::sample_t outre5,
  output ofdm_pkg::sample_t outre6,
  output ofdm_pkg::sample_t outre7,
  output ofdm_pkg::sample_t outim1,
  output ofdm_pkg::sample_t outim2,
  output ofdm_pkg::sample_t outim3,
  output ofdm_pkg::sample_t outim5,
  output ofdm_pkg::sample_t outim6,
  output ofdm_pkg::sample_t outim7
);
  import ofdm_pkg::*;

  sample_t in_vec [NPT];
  sample_t x      [NPT];
  sample_t re     [NPT];
  sample_t im     [NPT];

  assign in_vec = '{in_x0, in_x1, in_x2, in_x3, in_x4, in_x5, in_x6, in_x7};

  dft8_pass U_pass (.CLOCK, .reset, .in_x(in_vec), .x);

  for (genvar k = 0; k < NPT; k++) begin : g_path
    dft8_path #(.K(k), .INVERSE(1'b0), .SHIFT(SHIFT), .ROUND_NEAREST(ROUND_NEAREST)) U_path (
      .x, .re(re[k]), .im(im[k])
    );
  end

  assign outre0 = re[0];
  assign outre1 = re[1];
  assign outre2 = re[2];
  assign outre3 = re[3];
  assign outre4 = re[4];
  assign outre5 = re[5];
  assign outre6 = re[6];
  assign outre7 = re[7];
  assign outim1 = im[1];
  assign outim2 = im[2];
  assign outim3 = im[3];
  assign outim5 = im[5];
  assign outim6 = im[6];
  assign outim7 = im[7];

endmodule
