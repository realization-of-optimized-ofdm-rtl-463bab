// Testbench for bpsk: random data bits, checks the registered symbol
// (bit 0 -> 2'b01 = +1, bit 1 -> 2'b11 = -1), its one-clock latency and reset.
module tb_bpsk;
  logic CLK = 0, reset = 1, d = 0;
  logic [1:0] q;
  int checks = 0, failures = 0, cycles = 0;
  bit prev;

  bpsk dut (.CLK, .reset, .d, .q);

  always #5 CLK = ~CLK;
  always @(posedge CLK) cycles++;

  initial begin
    repeat (1000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL t=%0t d=%b q=%b expected %b", $time, prev, q, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge CLK);
    check(2'b01);
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      prev = d;
      @(negedge CLK);
      check(prev ? 2'b11 : 2'b01);
      // symbol as a signed number is +1 or -1
      checks++;
      if ($signed(q) != (prev ? -2'sd1 : 2'sd1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
