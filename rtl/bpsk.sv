// BPSK mapper.
//
// Maps one data bit to a 2-bit two's-complement symbol on every rising clock
// edge: d = 0 gives q = 2'b01 (+1) and d = 1 gives q = 2'b11 (-1). The symbol
// is q = {d, 1'b1}, so the data bit becomes the sign of the symbol and the
// constant 1 in the low bit gives it a magnitude of one.
//
// Interface: CLK, synchronous active-high reset, d in, q[1:0] out.
// Timing: q is registered, one clock of latency from d.
//
// The single register with d on its upper bit and a constant 1 below, and the
// symbol values 1 and 3, follow the design's schematic and waveform. The reset
// (to the +1 symbol) is added here so that the output is defined from the start.
module bpsk (
  input  logic       CLK,
  input  logic       reset,
  input  logic       d,
  output logic [1:0] q
);

  always_ff @(posedge CLK) begin
    if (reset) q <= 2'b01;
    else       q <= {d, 1'b1};
  end

endmodule
