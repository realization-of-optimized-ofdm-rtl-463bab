// Testbench for ofdm_rx: random bits on SERIN1..SERIN8, including long runs of
// large samples that drive the FFT into saturation. A word-level model
// (ofdm_ref_pkg::chain_model) predicts all fourteen serial outputs and
// word_start on every clock.
module tb_ofdm_rx;
  import ofdm_ref_pkg::*;

  logic CLOCK = 0, reset = 1;
  logic [7:0] serin = '0;
  logic [13:0] serout;
  logic word_start;
  int checks = 0, failures = 0;

  ofdm_rx dut (
    .CLOCK, .reset,
    .SERIN1(serin[0]), .SERIN2(serin[1]), .SERIN3(serin[2]), .SERIN4(serin[3]),
    .SERIN5(serin[4]), .SERIN6(serin[5]), .SERIN7(serin[6]), .SERIN8(serin[7]),
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
    bit sb [8];
    automatic int sat = 0;
    m = new(1'b0, 0);
    repeat (2) @(negedge CLOCK);
    reset = 0;
    for (int c = 0; c < 8 * 400; c++) begin
      // phases: random bits, then a stretch of all ones in the low bits (large positive words)
      if ((c / 256) % 2 == 1) serin = 8'hFF & ((c % 8 == 0) ? 8'h00 : 8'hFF);
      else                    serin = 8'($urandom);
      @(posedge CLOCK);
      for (int n = 0; n < 8; n++) sb[n] = serin[n];
      m.step(sb);
      for (int k = 0; k < 8; k++) if (m.yre[k] == 127 || m.yre[k] == -128) sat++;
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
    $display("words sent %0d, saturated real results %0d", m.loads, sat);
    if (sat == 0 || m.loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
