// OFDM transceiver: transmitter, receiver and de-mapping bank.
//
// The transmit chain (mapping, serial-to-parallel, 8-point IFFT,
// parallel-to-serial) and the receive chain (serial-to-parallel, 8-point FFT,
// parallel-to-serial, de-mapping) of an 8-subcarrier BPSK OFDM link. Up- and
// down-conversion and the channel between them are outside this design, so the
// transmitter's serial outputs and the receiver's serial inputs are ports.
// The de-mapping bank makes a hard BPSK decision on each of the eight real
// parts coming out of the receiver (serout1..8 of the receiver, which carry the
// real parts of FFT bins 0..7).
//
// Interface (all one bit per clock):
//   d[3:0]          transmit data, d[k] is transmitter input d(k+1)
//   tx_serout[13:0] transmitter outputs, bit i is serout(i+1)
//   tx_word_start   MSB marker of the transmitted words
//   rx_serin[7:0]   receiver inputs, bit n is SERIN(n+1)
//   rx_serout[13:0] receiver outputs, bit i is serout(i+1)
//   rx_word_start   MSB marker of the received words
//   rx_data[7:0]    de-mapped bit of FFT bin n, valid with rx_data_valid
// Timing: a new decision set appears every eight clocks, one clock after
// rx_word_start.
//
// The chain of blocks follows the design's transceiver diagram; the width of
// the de-mapping bank and its use of the real parts are this implementation's.
module ofdm_transceiver (
  input  logic        CLOCK,
  input  logic        reset,
  input  logic [3:0]  d,
  output logic [13:0] tx_serout,
  output logic        tx_word_start,
  input  logic [7:0]  rx_serin,
  output logic [13:0] rx_serout,
  output logic        rx_word_start,
  output logic [7:0]  rx_data,
  output logic        rx_data_valid
);

  logic [7:0] valid;

  ofdm_tx u_tx (
    .CLOCK, .reset,
    .d1(d[0]), .d2(d[1]), .d3(d[2]), .d4(d[3]),
    .serout1 (tx_serout[0]),  .serout2 (tx_serout[1]),  .serout3 (tx_serout[2]),
    .serout4 (tx_serout[3]),  .serout5 (tx_serout[4]),  .serout6 (tx_serout[5]),
    .serout7 (tx_serout[6]),  .serout8 (tx_serout[7]),  .serout9 (tx_serout[8]),
    .serout10(tx_serout[9]),  .serout11(tx_serout[10]), .serout12(tx_serout[11]),
    .serout13(tx_serout[12]), .serout14(tx_serout[13]),
    .word_start(tx_word_start)
  );

  ofdm_rx u_rx (
    .CLOCK, .reset,
    .SERIN1(rx_serin[0]), .SERIN2(rx_serin[1]), .SERIN3(rx_serin[2]), .SERIN4(rx_serin[3]),
    .SERIN5(rx_serin[4]), .SERIN6(rx_serin[5]), .SERIN7(rx_serin[6]), .SERIN8(rx_serin[7]),
    .serout1 (rx_serout[0]),  .serout2 (rx_serout[1]),  .serout3 (rx_serout[2]),
    .serout4 (rx_serout[3]),  .serout5 (rx_serout[4]),  .serout6 (rx_serout[5]),
    .serout7 (rx_serout[6]),  .serout8 (rx_serout[7]),  .serout9 (rx_serout[8]),
    .serout10(rx_serout[9]),  .serout11(rx_serout[10]), .serout12(rx_serout[11]),
    .serout13(rx_serout[12]), .serout14(rx_serout[13]),
    .word_start(rx_word_start)
  );

  // De-mapping bank on the real parts of the eight received bins
  for (genvar n = 0; n < 8; n++) begin : g_demap
    bpsk_demapper u_demap (
      .CLOCK, .reset,
      .sin(rx_serout[n]), .word_start(rx_word_start),
      .d_out(rx_data[n]), .d_valid(valid[n])
    );
  end

  assign rx_data_valid = &valid;  // all de-mappers run in step

endmodule
