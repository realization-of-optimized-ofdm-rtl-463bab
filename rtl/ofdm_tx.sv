// OFDM transmitter.
//
// Four serial data inputs d1..d4 are BPSK mapped; the two bits of each 2-bit
// symbol (the data bit as sign, a constant 1 below it) feed eight 8-bit
// serial-to-parallel converters. Their eight words are the real inputs of the
// 8-point inverse FFT, and the fourteen non-trivial outputs of the IFFT
// (outre0..7, outim1, 2, 3, 5, 6, 7) are each sent out serially, MSB first, on
// serout1..serout14. No cyclic prefix is added.
//
// Interface: CLOCK, synchronous active-high reset, d1..d4 (one bit per clock
// each), serout1..serout14 (one bit per clock each), word_start (high while
// the MSBs of the output words are on serout).
// Timing: everything runs on every clock. The converters form sliding windows;
// every eight clocks the parallel-to-serial converters take a fresh IFFT result
// and send it during the next eight clocks. A data bit reaches the IFFT input
// two clocks after it is applied (mapper and shift register), the IFFT adds one.
//
// The instances (4 mappers, 8 S/P converters, the IFFT, 14 P/S converters),
// their port names and the 14 serial outputs follow the design's schematic.
// Which mapper bit goes to which converter, and which IFFT output to which
// serout, cannot be read from it and are this implementation's choice.
module ofdm_tx (
  input  logic CLOCK,
  input  logic reset,
  input  logic d1,
  input  logic d2,
  input  logic d3,
  input  logic d4,
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

  // Mapping bank: mapper k feeds its symbol's MSB (the data bit) to
  // converter 2k and its LSB (constant 1) to converter 2k+1.
  logic       dbit [4];
  logic [1:0] sym  [4];
  assign dbit = '{d1, d2, d3, d4};
  for (genvar k = 0; k < 4; k++) begin : g_map
    bpsk uu (.CLK(CLOCK), .reset, .d(dbit[k]), .q(sym[k]));
    assign serin[2*k]   = sym[k][1];
    assign serin[2*k+1] = sym[k][0];
  end

  for (genvar n = 0; n < NPT; n++) begin : g_s2p
    sertopar UUT (.CLOCK, .reset, .SERIN(serin[n]), .Q(par[n]));
  end

  ifft8 UUT9 (
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
