// Testbench for bpsk_demapper: serial MSB-first words of random value; the
// decided bit must be 1 exactly for negative words, valid one clock after the
// MSB, and held for the rest of the word.
module tb_bpsk_demapper;
  logic CLOCK = 0, reset = 1, sin = 0, word_start = 0;
  logic d_out, d_valid;
  int checks = 0, failures = 0;

  bpsk_demapper dut (.CLOCK, .reset, .sin, .word_start, .d_out, .d_valid);

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (5000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0] w;
    bit exp;
    repeat (2) @(negedge CLOCK);
    checks++;
    if (d_out !== 0 || d_valid !== 0) failures++;
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      w = (i == 0) ? 8'sd0 : (i == 1) ? -8'sd1 : (i == 2) ? 8'sd127 : (i == 3) ? -8'sd128
                  : 8'($urandom);
      exp = (w < 0);
      for (int b = 7; b >= 0; b--) begin
        sin = w[b];
        word_start = (b == 7);
        @(negedge CLOCK);
        checks++;
        if (d_valid !== (b == 7)) begin
          failures++;
          $display("FAIL valid at bit %0d", b);
        end
        checks++;
        if (d_out !== exp) begin
          failures++;
          $display("FAIL word %0d (%0d) decided %b expected %b", i, w, d_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
