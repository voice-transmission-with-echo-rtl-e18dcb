// tb_ref_pkg: reference model of the echo and reverb for the testbenches.
//
// Delays are the effect table delays in seconds times the 12.5 kHz rate of
// the delay line; gains are 1 for the echo and 1/2, 1/4, 1/8, 1/16 for the
// reverb, applied as a floor division of the delayed sample. Samples before
// the start of the history count as 0. The result is clipped to 12 bits.
package tb_ref_pkg;
  localparam real FS = 12500.0;

  function automatic int delay_of(int mode, int t);
    real sec;
    case (mode)
      0: sec = 0.32;
      1: sec = 0.128;
      2: sec = 0.04 * (2.0 ** t);
      default: sec = 0.016 * (2.0 ** t);
    endcase
    return $rtoi(sec * FS + 0.5);
  endfunction

  function automatic int fx_ref(const ref int hist[$], input int n, input int mode);
    int y, ntaps, d, v;
    y = hist[n];
    ntaps = (mode < 2) ? 1 : 4;
    for (int t = 0; t < ntaps; t++) begin
      d = delay_of(mode, t);
      v = (n - d >= 0) ? hist[n - d] : 0;
      if (mode < 2) y += v;
      else          y += $floor(real'(v) / (2.0 ** (t + 1)));
    end
    if (y > 2047)  y = 2047;
    if (y < -2048) y = -2048;
    return y;
  endfunction

  function automatic bit fx_saturates(const ref int hist[$], input int n, input int mode);
    int y, ntaps, d, v;
    y = hist[n];
    ntaps = (mode < 2) ? 1 : 4;
    for (int t = 0; t < ntaps; t++) begin
      d = delay_of(mode, t);
      v = (n - d >= 0) ? hist[n - d] : 0;
      if (mode < 2) y += v;
      else          y += $floor(real'(v) / (2.0 ** (t + 1)));
    end
    return (y > 2047) || (y < -2048);
  endfunction
endpackage
