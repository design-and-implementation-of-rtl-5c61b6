// mcesd_ref_pkg: reference arithmetic for the testbenches, written from the
// detection algorithm rather than from the RTL: the CM complexity measure,
// DFT band magnitudes and the LLS sum with its saturation.
package mcesd_ref_pkg;

  // CM^p of one 16-point part in 1.12: S2/S1 with
  // S1 = #{i<j<=14 : |u_i-u_j| <= r}, S2 = those with also |u_i+1-u_j+1| <= 2r
  function automatic int ref_cmp(int u[64], int base, int r);
    int s1, s2, a, b;
    s1 = 0; s2 = 0;
    for (int i = 0; i < 15; i++)
      for (int j = i + 1; j < 15; j++) begin
        a = u[base+i] - u[base+j];     if (a < 0) a = -a;
        b = u[base+i+1] - u[base+j+1]; if (b < 0) b = -b;
        if (a <= r) begin
          s1++;
          if (b <= 2 * r) s2++;
        end
      end
    return (s1 == 0) ? 0 : (s2 * 4096) / s1;
  endfunction

  function automatic int ref_cm(int u[64], int r);
    return ref_cmp(u, 0, r) + ref_cmp(u, 16, r) + ref_cmp(u, 32, r) + ref_cmp(u, 48, r);
  endfunction

  // |X(k)| of the 64-point DFT
  function automatic real ref_mag(int u[64], int k);
    real re, im, a;
    re = 0.0; im = 0.0;
    for (int n = 0; n < 64; n++) begin
      a = 2.0 * 3.14159265358979 * real'(n * k) / 64.0;
      re += real'(u[n]) * $cos(a);
      im -= real'(u[n]) * $sin(a);
    end
    return $sqrt(re * re + im * im);
  endfunction

  // band value in 9.7: |X|/32 * 128 = 4|X|
  function automatic int ref_band(int u[64], int k);
    return int'($floor(4.0 * ref_mag(u, k)));
  endfunction

  // LLS in 17.16, saturated to 33 bits
  function automatic longint ref_lls(int cm, int b1, int b2, int c_cm, int c_b1,
                                     int c_b2, int const1, int const2);
    longint s;
    s = longint'(cm) * c_cm + longint'(b1) * c_b1 + longint'(b2) * c_b2 +
        longint'(const1) * 65536 + longint'(const2);
    if (s > 64'sd4294967295) s = 64'sd4294967295;
    if (s < -64'sd4294967296) s = -64'sd4294967296;
    return s;
  endfunction

  // Synthetic EEG, 8-bit offset-binary codes, one sample of channel state
  // kind at sample index n:
  //   0 wake    : broadband noise, 128 +- 100
  //   1 seizure : spike-and-wave-like rhythm of period 16 samples (12.5 Hz),
  //               plateaus at 128 +- 60 with +-1 noise: regular, strong bin 4
  //   2 sleep   : slow, nearly flat wave at 188 +- 2: regular, strong bin 0
  function automatic int eeg_sample(int kind, int n);
    case (kind)
      1:       return ((n % 16) < 8 ? 188 : 68) + int'($urandom_range(2)) - 1;
      2:       return 188 + int'($urandom_range(4)) - 2;
      default: return 28 + int'($urandom_range(200));
    endcase
  endfunction

endpackage
