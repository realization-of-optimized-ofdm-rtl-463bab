// Parallel-to-serial converter.
//
// A free-running 3-bit counter drives the select of an 8:1 multiplexer that
// puts one bit of an 8-bit word on DOUT_1 per clock. The word is parallel
// loaded into a holding register on the clock edge where the counter wraps
// (count 7 -> 0), so the eight bits sent in one counter period all belong to
// the same word even if DIN_1 changes in between. Bits leave MSB first,
// which is the order in which the serial-to-parallel converter rebuilds a word.
//
// Interface: CLOCK, synchronous active-high reset, DIN_1[7:0] in, DOUT_1 out,
// word_start out (high while the MSB of a word is on DOUT_1).
// Timing: a word sampled at the edge that ends count 7 is sent during the next
// eight clocks, MSB first. All converters reset together run in step.
//
// The counter plus multiplexer structure follows the design's schematic; the
// holding register is how the parallel load of the description is realised
// here. MSB-first order, the reset and word_start are choices of this design.
module par_ser (
  input  logic       CLOCK,
  input  logic       reset,
  input  logic [7:0] DIN_1,
  output logic       DOUT_1,
  output logic       word_start
);

  logic [2:0] count;
  logic [7:0] hold;

  always_ff @(posedge CLOCK) begin
    if (reset) begin
      count <= '0;
      hold  <= '0;
    end else begin
      count <= count + 3'd1;
      if (count == 3'd7) hold <= DIN_1;
    end
  end

  // 8:1 multiplexer, MSB first
  always_comb DOUT_1 = hold[3'd7 - count];

  assign word_start = (count == 3'd0);

endmodule
