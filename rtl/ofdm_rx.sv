// OFDM receiver.
//
// Eight serial streams SERIN1..SERIN8 are each collected by an 8-bit
// serial-to-parallel converter; the eight words are the real inputs of the
// 8-point FFT, and its fourteen non-trivial outputs (outre0..7, outim1, 2, 3,
// 5, 6, 7) are each sent out serially, MSB first, on serout1..serout14. No
// cyclic prefix is removed.
//
// Interface: CLOCK, synchronous active-high reset, SERIN1..SERIN8 (one bit per
// clock each), serout1..serout14, word_start (high while the MSBs of the output
// words are on serout).
// Timing: the FFT input is the last eight bits of each stream, MSB first. An
// FFT result is ready one clock after its input word is complete, and
// is taken by the parallel-to-serial converters at the next edge where their
// counters wrap, then sent during the next eight clocks.
//
// The instances (8 S/P converters, the FFT, 14 P/S converters), their port
// names and the 14 serial outputs follow the design's schematic; the mapping of
// FFT outputs onto serout1..14 is this implementation's choice.
module ofdm_rx (
  input  logic CLOCK,
  input  logic reset,
  input  logic SERIN1,
  input  logic SERIN2,
  input  logic SERIN3,
  input  logic SERIN4,
  input  logic SERIN5,
  input  logic SERIN6,
  input  logic SERIN7,
  input  logic SERIN8,
  output logic serout1,
  output logic serout2,
  output logic serout3,
  output logic serout4,
  output logic serout5,
  output logic serout6,
  output logic serout7,
  output logic serout8,
  output logic serout9,
  output logic serout10,
  output logic serout11,
  output logic serout12,
  output logic serout13,
  output logic serout14,
  output logic word_start
);
  import ofdm_pkg::*;

  logic    serin [NPT];     // serial streams into the S/P converters
  sample_t par   [NPT];     // parallel words, one per converter
  sample_t yre   [NPT];     // transform outputs, real parts
  sample_t yim   [NPT];     // transform outputs, imaginary parts (1,2,3,5,6,7 used)
  sample_t pin   [14];      // words into the P/S converters
  logic    pout  [14];
  logic    wst   [14];

  assign serin = '{SERIN1, SERIN2, SERIN3, SERIN4, SERIN5, SERIN6, SERIN7, SERIN8};

  for (genvar n = 0; n < NPT; n++) begin : g_s2p
    sertopar UUT (.CLOCK, .reset, .SERIN(serin[n]), .Q(par[n]));
  end

  fft8 UUT9 (
    .CLOCK, .reset,
    .in_x0(par[0]), .in_x1(par[1]), .in_x2(par[2]), .in_x3(par[3]), .in_x4(par[4]), .in_x5(par[5]), .in_x6(par[6]), .in_x7(par[7]),
    .outre0(yre[0]), .outre1(yre[1]), .outre2(yre[2]), .outre3(yre[3]), .outre4(yre[4]), .outre5(yre[5]), .outre6(yre[6]), .outre7(yre[7]),
    .outim1(yim[1]), .outim2(yim[2]), .outim3(yim[3]), .outim5(yim[5]), .outim6(yim[6]), .outim7(yim[7])
  );
  assign yim[0] = '0;  // bins 0 and 4 of a real input have no imaginary part
  assign yim[4] = '0;

  // serout1..8 carry outre0..7, serout9..14 carry outim1, 2, 3, 5, 6, 7
  assign pin = '{yre[0], yre[1], yre[2], yre[3], yre[4], yre[5], yre[6], yre[7],
                 yim[1], yim[2], yim[3], yim[5], yim[6], yim[7]};
  for (genvar i = 0; i < 14; i++) begin : g_p2s
    par_ser UUT (.CLOCK, .reset, .DIN_1(pin[i]), .DOUT_1(pout[i]), .word_start(wst[i]));
  end

  assign {serout1, serout2, serout3, serout4, serout5, serout6, serout7, serout8, serout9, serout10, serout11, serout12, serout13, serout14} =
         {pout[0], pout[1], pout[2], pout[3], pout[4], pout[5], pout[6], pout[7], pout[8], pout[9], pout[10], pout[11], pout[12], pout[13]};
  // all converters share reset and clock, so their counters run in step
  assign word_start = wst[0];

endmodule
