// tb_coef_pkg: reference FIR coefficients for the testbenches, computed from
// the design formula rather than read from the ROM image.
// Channel c (0 EEG1 0-4 Hz @200 S/s, 1 EEG2 5-10 Hz @200 S/s, 2 EMG
// 100-200 Hz @800 S/s), tap n of 64:
//   h[n] = w[n] * (2 f2/fs sinc(2 f2/fs m) - 2 f1/fs sinc(2 f1/fs m)),
//   m = n - 31.5, w[n] = 0.54 - 0.46 cos(2 pi n / 63),
// quantized to round(128 h[n]) and clipped to -127..127.
package tb_coef_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real lp(real fc, real fs, real m);
    real a;
    a = 2.0 * PI * fc / fs * m;
    return 2.0 * fc / fs * $sin(a) / a;
  endfunction

  function automatic int coef(int ch, int n);
    real f1, f2, fs, m, w, h, r;
    int q;
    case (ch)
      0:       begin f1 = 0.0;   f2 = 4.0;   fs = 200.0; end
      1:       begin f1 = 5.0;   f2 = 10.0;  fs = 200.0; end
      default: begin f1 = 100.0; f2 = 200.0; fs = 800.0; end
    endcase
    m = real'(n) - 31.5;
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / 63.0);
    h = lp(f2, fs, m);
    if (f1 > 0.0) h = h - lp(f1, fs, m);
    r = h * w * 128.0;
    q = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
    if (q > 127) q = 127;
    if (q < -127) q = -127;
    return q;
  endfunction

endpackage
