// BPSK de-mapper (hard decision).
//
// Recovers a data bit from one 8-bit two's-complement word that arrives
// serially, MSB first. The mapper sends bit 0 as +1 and bit 1 as -1, so the
// decision is the sign of the received value: a negative word gives 1, zero or
// a positive word gives 0. The sign is the MSB, which is on the line while
// word_start is high; it is captured then and held until the next word.
//
// Interface: CLOCK, synchronous active-high reset, sin (serial word),
// word_start (high with the MSB of each word), d_out (decided bit),
// d_valid (one-clock pulse when d_out takes a new decision).
// Timing: d_out and d_valid change on the clock edge that ends the MSB.
//
// A de-mapping stage after the receiver's parallel-to-serial conversion follows
// the design; the sign decision and the serial word framing are this
// implementation's, chosen as the exact inverse of the mapper.
module bpsk_demapper (
  input  logic CLOCK,
  input  logic reset,
  input  logic sin,
  input  logic word_start,
  output logic d_out,
  output logic d_valid
);

  always_ff @(posedge CLOCK) begin
    if (reset) begin
      d_out   <= 1'b0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= word_start;
      if (word_start) d_out <= sin;
    end
  end

endmodule
