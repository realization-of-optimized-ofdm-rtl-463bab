// Testbench for fft8: random real input symbols (and extreme ones) are
// applied on consecutive clocks; every output is compared, one clock later,
// with a floating-point evaluation of the transform from ofdm_ref_pkg.
module tb_fft8;
  import ofdm_ref_pkg::*;
  localparam bit INV = 1'b0;
  localparam int SH  = 0;

  logic CLOCK = 0, reset = 1;
  ofdm_pkg::sample_t in_x [8];
  ofdm_pkg::sample_t outre [8];
  ofdm_pkg::sample_t outim [8];
  int checks = 0, failures = 0, saturated = 0;
  int hist [$];

  fft8 dut (
    .CLOCK, .reset,
    .in_x0(in_x[0]), .in_x1(in_x[1]), .in_x2(in_x[2]), .in_x3(in_x[3]),
    .in_x4(in_x[4]), .in_x5(in_x[5]), .in_x6(in_x[6]), .in_x7(in_x[7]),
    .outre0(outre[0]), .outre1(outre[1]), .outre2(outre[2]), .outre3(outre[3]),
    .outre4(outre[4]), .outre5(outre[5]), .outre6(outre[6]), .outre7(outre[7]),
    .outim1(outim[1]), .outim2(outim[2]), .outim3(outim[3]),
    .outim5(outim[5]), .outim6(outim[6]), .outim7(outim[7])
  );
  assign outim[0] = '0;
  assign outim[4] = '0;

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (5000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare the outputs with the reference of the symbol applied 1 clock ago
  task automatic check_against(int x[8]);
    int re[8], im[8];
    dft(x, INV, SH, 1'b0, re, im);
    for (int k = 0; k < 8; k++) begin
      checks += 2;
      if (int'(outre[k]) != re[k] || int'(outim[k]) != im[k]) begin
        failures++;
        $display("FAIL bin %0d got (%0d,%0d) expected (%0d,%0d)", k, outre[k], outim[k], re[k], im[k]);
      end
      if (re[k] == 127 || re[k] == -128 || im[k] == 127 || im[k] == -128) saturated++;
    end
  endtask

  initial begin
    int sym [$][8];
    int x [8];
    for (int n = 0; n < 8; n++) in_x[n] = '0;
    repeat (2) @(negedge CLOCK);
    reset = 0;
    // symbol list: published example, extremes, random
    x = '{'h34, 'h34, 'h34, 'h34, 'h34, 'h23, 'h42, 'h12}; sym.push_back(x);
    x = '{127, 127, 127, 127, 127, 127, 127, 127};          sym.push_back(x);
    x = '{-128, -128, -128, -128, -128, -128, -128, -128};  sym.push_back(x);
    x = '{127, -128, 127, -128, 127, -128, 127, -128};      sym.push_back(x);
    x = '{1, 0, 0, 0, 0, 0, 0, 0};                          sym.push_back(x);
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < 8; n++) x[n] = s8(int'($urandom));
      sym.push_back(x);
    end
    for (int i = 0; i < sym.size(); i++) begin
      for (int n = 0; n < 8; n++) in_x[n] = 8'(sym[i][n]);
      @(negedge CLOCK);
      // one edge later the result of symbol i is visible: latency 1
      check_against(sym[i]);
    end
    $display("results at the 8-bit limits: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
