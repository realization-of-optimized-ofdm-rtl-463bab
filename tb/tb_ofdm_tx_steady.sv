// Steady-input run of ofdm_tx: d1 = d2 = d3 = 1 and d4 = 0 held constant, the
// input setting of the transmitter's published simulation. Once the pipeline
// has filled, the IFFT input words are -1 (0xFF) everywhere except in_x6 = 0
// (from d4). Worked out by hand: y[k] = (1/8) * (-8*[k==0] + exp(j*3*pi*k/2)),
// so y[0] = -7/8 and |y[k]| = 1/8 otherwise; truncated towards zero every
// output word is 0, and all fourteen serial outputs must stay low.
module tb_ofdm_tx_steady;
  logic CLOCK = 0, reset = 1;
  logic [13:0] serout;
  logic word_start;
  int checks = 0, failures = 0, words = 0;

  ofdm_tx dut (
    .CLOCK, .reset, .d1(1'b1), .d2(1'b1), .d3(1'b1), .d4(1'b0),
    .serout1(serout[0]), .serout2(serout[1]), .serout3(serout[2]), .serout4(serout[3]),
    .serout5(serout[4]), .serout6(serout[5]), .serout7(serout[6]), .serout8(serout[7]),
    .serout9(serout[8]), .serout10(serout[9]), .serout11(serout[10]), .serout12(serout[11]),
    .serout13(serout[12]), .serout14(serout[13]), .word_start
  );

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (2000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge CLOCK);
    reset = 0;
    // fill: 2 clocks to the shift registers, 8 to fill them, 1 for the IFFT
    // register, then up to 8 until the next load and 8 more to send it
    repeat (32) @(negedge CLOCK);
    for (int c = 0; c < 8 * 50; c++) begin
      checks++;
      if (serout !== '0) begin
        failures++;
        if (failures < 10) $display("FAIL serout = %b", serout);
      end
      if (word_start) words++;
      @(negedge CLOCK);
    end
    checks++;
    if (words != 50) begin failures++; $display("FAIL %0d words", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
