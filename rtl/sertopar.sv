// Serial-to-parallel converter.
//
// An 8-stage shift register: on every rising clock edge the word Q moves one
// place towards its MSB and SERIN enters at Q[0]. After eight clocks Q holds the
// last eight serial bits, the oldest in Q[7], so a word sent MSB first arrives
// in its natural bit order.
//
// Interface: CLOCK, synchronous active-high reset, SERIN in, Q[7:0] out.
// Timing: one new bit per clock; Q is registered and changes every clock (it is
// a sliding window, any framing is done downstream).
//
// The chain of eight flip-flops and the shift direction follow the design; the
// reset to zero is added here.
module sertopar (
  input  logic       CLOCK,
  input  logic       reset,
  input  logic       SERIN,
  output logic [7:0] Q
);

  always_ff @(posedge CLOCK) begin
    if (reset) Q <= '0;
    else       Q <= {Q[6:0], SERIN};
  end

endmodule
