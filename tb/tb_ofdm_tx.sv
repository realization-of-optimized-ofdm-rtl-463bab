// Testbench for ofdm_tx: random data on d1..d4 for many symbol periods. A
// word-level model (ofdm_ref_pkg::chain_model with a mapper stage in front)
// predicts all fourteen serial outputs and word_start on every clock.
module tb_ofdm_tx;
  import ofdm_ref_pkg::*;

  logic CLOCK = 0, reset = 1;
  logic [3:0] d = '0;
  logic [13:0] serout;
  logic word_start;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  ofdm_tx dut (
    .CLOCK, .reset, .d1(d[0]), .d2(d[1]), .d3(d[2]), .d4(d[3]),
    .serout1(serout[0]), .serout2(serout[1]), .serout3(serout[2]), .serout4(serout[3]),
    .serout5(serout[4]), .serout6(serout[5]), .serout7(serout[6]), .serout8(serout[7]),
    .serout9(serout[8]), .serout10(serout[9]), .serout11(serout[10]), .serout12(serout[11]),
    .serout13(serout[12]), .serout14(serout[13]), .word_start
  );

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (20000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chain_model m;
    logic [1:0] sym [4];
    bit serin [8];
    m = new(1'b1, 3);
    for (int k = 0; k < 4; k++) sym[k] = 2'b01;
    repeat (2) @(negedge CLOCK);
    reset = 0;
    for (int c = 0; c < 8 * 400; c++) begin
      // hold each data bit pattern for a random number of clocks
      if ($urandom_range(0, 3) == 0) d = 4'($urandom);
      for (int k = 0; k < 4; k++) if (d[k]) ones++; else zeros++;
      @(posedge CLOCK);
      for (int k = 0; k < 4; k++) begin
        serin[2*k]   = sym[k][1];
        serin[2*k+1] = sym[k][0];
      end
      m.step(serin);
      for (int k = 0; k < 4; k++) sym[k] = {d[k], 1'b1};
      @(negedge CLOCK);
      for (int i = 0; i < 14; i++) begin
        checks++;
        if (serout[i] !== m.out(i)) begin
          failures++;
          if (failures < 10) $display("FAIL clock %0d serout%0d = %b expected %b", c, i + 1, serout[i], m.out(i));
        end
      end
      checks++;
      if (word_start !== (m.cnt == 0)) failures++;
    end
    $display("data ones %0d zeros %0d, words sent %0d", ones, zeros, m.loads);
    if (ones == 0 || zeros == 0 || m.loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
