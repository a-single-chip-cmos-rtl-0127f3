// afg_ref_pkg: reference functions shared by the testbenches - the ideal
// output sample of each waveform for a 14-bit phase, and the random sequence.
// Sine uses $sin over the full circle; it is accurate to the rounding of the
// ideal wave, so comparisons against it allow 1 LSB.
package afg_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // ideal 10-bit offset-binary sine: 511.5 + 511 * sin((p + 0.5) * 2pi / 16384), rounded
  function automatic int ref_sine(int p);
    real s;
    int  m;
    s = $sin((real'(p) + 0.5) * PI / 8192.0);
    m = int'($floor(511.0 * (s < 0 ? -s : s) + 0.5));
    return (s >= 0.0) ? 512 + m : 511 - m;
  endfunction

  // x^23 + x^18 + 1 sequence, ten steps
  function automatic logic [22:0] lfsr_step10(logic [22:0] s);
    for (int i = 0; i < 10; i++) s = {s[21:0], s[22] ^ s[17]};
    return s;
  endfunction

  // sample of waveform w (0 sine, 1 triangle, 2 saw-tooth, 3 random)
  function automatic int ref_sample(int w, logic [13:0] ph, logic [22:0] lf);
    case (w)
      0: return ref_sine(int'(ph));
      1: return ph[13] ? int'(10'(~ph[12:3])) : int'(ph[12:3]);
      2: return int'(ph[13:4]);
      default: return int'(lf[9:0]);
    endcase
  endfunction

endpackage
