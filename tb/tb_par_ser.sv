// Testbench for par_ser: a new random word is offered every clock; the
// converter must send, MSB first, exactly the word present on the edge that
// ended count 7, one bit per clock, with word_start on the MSB.
module tb_par_ser;
  logic CLOCK = 0, reset = 1;
  logic [7:0] DIN_1 = 0;
  logic DOUT_1, word_start;
  int checks = 0, failures = 0, words = 0;
  logic [7:0] latched, rebuilt;

  par_ser dut (.CLOCK, .reset, .DIN_1, .DOUT_1, .word_start);

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (5000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge CLOCK);
    reset = 0;
    // first period after reset sends the cleared holding register
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (word_start !== (b == 0) || DOUT_1 !== 1'b0) failures++;
      DIN_1 = 8'($urandom);
      latched = DIN_1;          // value seen at the 8th edge is the one loaded
      @(negedge CLOCK);
    end
    for (int w = 0; w < 100; w++) begin
      logic [7:0] next_latched;
      rebuilt = '0;
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (word_start !== (b == 0)) begin
          failures++;
          $display("FAIL word_start at bit %0d", b);
        end
        rebuilt = {rebuilt[6:0], DOUT_1};
        DIN_1 = 8'($urandom);    // changes every clock, must not disturb the word
        next_latched = DIN_1;
        @(negedge CLOCK);
      end
      checks++;
      words++;
      if (rebuilt !== latched) begin
        failures++;
        $display("FAIL word %0d sent %h expected %h", w, rebuilt, latched);
      end
      latched = next_latched;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
