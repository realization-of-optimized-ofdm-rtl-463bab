// Reference models for the OFDM testbenches.
//
// dft() evaluates an 8-point transform of real samples in floating point
// (twiddle factor cos(pi/4) taken as 181/256, the fixed-point value the design
// uses), divides by 2^shift, truncates towards zero (or rounds half away from
// zero) and saturates to 8 bits. chain_model follows the transmitter and
// receiver clock by clock at the level of whole words: eight shift registers,
// the transform's input register (the transform itself is combinational) and
// fourteen parallel-to-serial converters with a common counter.
package ofdm_ref_pkg;

  function automatic real cf(int m);
    real c = 181.0 / 256.0;
    case (m % 8)
      0: return 1.0;  1: return c;  2: return 0.0;  3: return -c;
      4: return -1.0; 5: return -c; 6: return 0.0;  default: return c;
    endcase
  endfunction

  function automatic real sf(int m);
    real c = 181.0 / 256.0;
    case (m % 8)
      0: return 0.0;  1: return c;  2: return 1.0;  3: return c;
      4: return 0.0;  5: return -c; 6: return -1.0; default: return -c;
    endcase
  endfunction

  function automatic int sat8(int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic int to_int(real v, bit rnd);
    real a = (v < 0.0) ? -v : v;
    int  m;
    if (rnd) m = $rtoi($floor(a + 0.5));
    else     m = $rtoi($floor(a));
    return sat8((v < 0.0) ? -m : m);
  endfunction

  function automatic void dft(input int x[8], input bit inverse, input int shift,
                              input bit rnd, output int re[8], output int im[8]);
    for (int k = 0; k < 8; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < 8; n++) begin
        sr += x[n] * cf(n * k);
        si += x[n] * sf(n * k);
      end
      if (!inverse) si = -si;
      re[k] = to_int(sr / (2.0 ** shift), rnd);
      im[k] = to_int(si / (2.0 ** shift), rnd);
    end
  endfunction

  function automatic int s8(int v);
    v = v & 255;
    return (v >= 128) ? v - 256 : v;
  endfunction

  class chain_model;
    bit inverse;
    int shift;
    int sr[8], pass[8], yre[8], yim[8], hold[14], cnt;  // yre/yim: transform of pass
    int loads;

    function new(bit inv, int sh);
      inverse = inv; shift = sh; clear();
    endfunction

    function void clear();
      for (int i = 0; i < 8; i++) begin sr[i] = 0; pass[i] = 0; yre[i] = 0; yim[i] = 0; end
      for (int i = 0; i < 14; i++) hold[i] = 0;
      cnt = 0;
    endfunction

    // One rising clock edge with the given serial inputs.
    function void step(bit serin[8]);
      int r[8], m[8];
      dft(pass, inverse, shift, 1'b0, r, m);
      yre = r; yim = m;
      if (cnt == 7) begin
        for (int i = 0; i < 8; i++) hold[i] = yre[i];
        hold[8]  = yim[1]; hold[9]  = yim[2]; hold[10] = yim[3];
        hold[11] = yim[5]; hold[12] = yim[6]; hold[13] = yim[7];
        loads++;
      end
      cnt = (cnt + 1) % 8;
      for (int i = 0; i < 8; i++) pass[i] = s8(sr[i]);
      for (int i = 0; i < 8; i++) sr[i] = ((sr[i] << 1) | int'(serin[i])) & 255;
    endfunction

    function bit out(int i);
      return hold[i][7 - cnt];
    endfunction
  endclass

endpackage
