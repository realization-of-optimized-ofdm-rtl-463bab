// End-to-end testbench for ofdm_transceiver, at its default configuration.
//
// Transmit side: random data on d[3:0]; all fourteen serial outputs are
// predicted clock by clock by the word-level model of ofdm_ref_pkg.
// Receive side: the testbench plays the channel. Each OFDM symbol carries eight
// BPSK bits b[0..7] on the eight bins, with b[8-k] = b[k] so that the time
// signal is real: x[n] = round( (1/8) * sum_k s[k] * cos(2*pi*k*n/8) ),
// s[k] = +A for bit 0 and -A for bit 1. The eight samples go out serially, MSB
// first, one per SERIN line, back to back, aligned to the receiver's eight-clock
// word period. The de-mapped bits must equal the sent bits, and the receiver's
// serial outputs are also checked against the model.
// Counted mechanisms: data 0 and 1 mapped, transmitter words, receiver words,
// de-mapped 0 and 1 on every bin; a mechanism that never happens is a failure.
module tb_ofdm_transceiver;
  import ofdm_ref_pkg::*;

  localparam int A       = 32;
  localparam int FRAMES  = 300;

  logic CLOCK = 0, reset = 1;
  logic [3:0]  d = '0;
  logic [13:0] tx_serout, rx_serout;
  logic        tx_word_start, rx_word_start;
  logic [7:0]  rx_serin = '0;
  logic [7:0]  rx_data;
  logic        rx_data_valid;
  int checks = 0, failures = 0;

  ofdm_transceiver dut (
    .CLOCK, .reset, .d, .tx_serout, .tx_word_start,
    .rx_serin, .rx_serout, .rx_word_start, .rx_data, .rx_data_valid
  );

  always #5 CLOCK = ~CLOCK;

  initial begin
    repeat (8 * FRAMES + 2000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] fbits  [FRAMES + 2];
  int         fsamp  [FRAMES + 2][8];

  function automatic void make_frame(int f);
    logic [7:0] b;
    real s [8];
    b = 8'($urandom);
    b[5] = b[3]; b[6] = b[2]; b[7] = b[1];
    fbits[f] = b;
    for (int k = 0; k < 8; k++) s[k] = b[k] ? -A : A;
    for (int n = 0; n < 8; n++) begin
      real acc = 0.0;
      for (int k = 0; k < 8; k++) acc += s[k] * $cos(2.0 * 3.14159265358979 * k * n / 8.0);
      fsamp[f][n] = $rtoi((acc / 8.0 >= 0.0) ? $floor(acc / 8.0 + 0.5) : -$floor(-acc / 8.0 + 0.5));
    end
  endfunction

  initial begin
    chain_model mtx, mrx;
    logic [1:0] sym [4];
    bit sin_tx [8], sin_rx [8];
    automatic int ones = 0, zeros = 0, nvalid = 0, frames_checked = 0;
    int dec1 [8], dec0 [8];
    mtx = new(1'b1, 3);
    mrx = new(1'b0, 0);
    for (int k = 0; k < 4; k++) sym[k] = 2'b01;
    for (int k = 0; k < 8; k++) begin dec1[k] = 0; dec0[k] = 0; end
    for (int f = 0; f < FRAMES + 2; f++) make_frame(f);
    repeat (2) @(negedge CLOCK);
    reset = 0;
    for (int e = 0; e < 8 * FRAMES; e++) begin
      // inputs for the next edge, number e+1 after reset
      automatic int e1 = e + 1;
      if ($urandom_range(0, 3) == 0) d = 4'($urandom);
      for (int k = 0; k < 4; k++) if (d[k]) ones++; else zeros++;
      if (e1 >= 7) begin
        automatic int f = (e1 + 1) / 8, p = (e1 + 1) % 8;
        for (int n = 0; n < 8; n++) rx_serin[n] = fsamp[f][n][7 - p];
      end else rx_serin = '0;
      @(posedge CLOCK);
      for (int k = 0; k < 4; k++) begin
        sin_tx[2*k] = sym[k][1];
        sin_tx[2*k+1] = sym[k][0];
      end
      mtx.step(sin_tx);
      for (int k = 0; k < 4; k++) sym[k] = {d[k], 1'b1};
      for (int n = 0; n < 8; n++) sin_rx[n] = rx_serin[n];
      mrx.step(sin_rx);
      @(negedge CLOCK);
      for (int i = 0; i < 14; i++) begin
        checks += 2;
        if (tx_serout[i] !== mtx.out(i)) begin
          failures++;
          if (failures < 10) $display("FAIL tx serout%0d at clock %0d", i + 1, e1);
        end
        if (rx_serout[i] !== mrx.out(i)) begin
          failures++;
          if (failures < 10) $display("FAIL rx serout%0d at clock %0d", i + 1, e1);
        end
      end
      checks += 2;
      if (tx_word_start !== (mtx.cnt == 0)) failures++;
      if (rx_word_start !== (mrx.cnt == 0)) failures++;
      if (rx_data_valid) begin
        // decision j belongs to the frame sent j-1 word periods earlier
        if (nvalid >= 2) begin
          automatic logic [7:0] exp = fbits[nvalid - 1];
          checks++;
          frames_checked++;
          if (rx_data !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d decided %b sent %b", nvalid - 1, rx_data, exp);
          end
          for (int k = 0; k < 8; k++) if (rx_data[k]) dec1[k]++; else dec0[k]++;
        end
        nvalid++;
      end
    end
    $display("data ones %0d zeros %0d; tx words %0d, rx words %0d; frames de-mapped %0d",
             ones, zeros, mtx.loads, mrx.loads, frames_checked);
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL mapper saw only one bit value"); end
    if (mtx.loads == 0 || mrx.loads == 0) begin failures++; $display("FAIL no words sent"); end
    if (frames_checked < FRAMES / 2) begin failures++; $display("FAIL too few frames"); end
    for (int k = 0; k < 8; k++)
      if (dec1[k] == 0 || dec0[k] == 0) begin
        failures++;
        $display("FAIL bin %0d decided only one value", k);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
