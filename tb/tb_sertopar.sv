// Testbench for sertopar: replays the bit pattern 1,0,1,0,0,0,0 whose word
// sequence 01, 02, 05, 0A, 14, 28, 50 is known, then random bits against a
// software shift register.
module tb_sertopar;
  logic CLOCK = 0, reset = 1, SERIN = 0;
  logic [7:0] Q;
  int checks = 0, failures = 0;
  logic [7:0] model;

  sertopar dut (.CLOCK, .reset, .SERIN, .Q);

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (2000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] exp);
    checks++;
    if (Q !== exp) begin
      failures++;
      $display("FAIL t=%0t Q=%h expected %h", $time, Q, exp);
    end
  endtask

  initial begin
    automatic bit pat [7] = '{1, 0, 1, 0, 0, 0, 0};
    automatic logic [7:0] exp [7] = '{8'h01, 8'h02, 8'h05, 8'h0A, 8'h14, 8'h28, 8'h50};
    repeat (2) @(negedge CLOCK);
    check(8'h00);
    reset = 0;
    for (int i = 0; i < 7; i++) begin
      SERIN = pat[i];
      @(negedge CLOCK);
      check(exp[i]);
    end
    model = Q;
    for (int i = 0; i < 300; i++) begin
      SERIN = 1'($urandom);
      model = {model[6:0], SERIN};
      @(negedge CLOCK);
      check(model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
