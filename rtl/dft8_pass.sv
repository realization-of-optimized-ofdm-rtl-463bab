// Input register stage of the 8-point transforms.
//
// Captures the eight input samples on a rising clock edge and hands the same
// set to all eight path units, so every output bin is computed from one
// consistent symbol.
//
// Interface: CLOCK, synchronous active-high reset (clears the samples),
// in_x[0:7] in, x[0:7] out. Timing: one clock of latency.
//
// A shared input stage feeding the eight path units follows the design's
// schematic of both transforms.
module dft8_pass (
  input  logic              CLOCK,
  input  logic              reset,
  input  ofdm_pkg::sample_t in_x [ofdm_pkg::NPT],
  output ofdm_pkg::sample_t x    [ofdm_pkg::NPT]
);

  always_ff @(posedge CLOCK) begin
    for (int n = 0; n < ofdm_pkg::NPT; n++) begin
      if (reset) x[n] <= '0;
      else       x[n] <= in_x[n];
    end
  end

endmodule
