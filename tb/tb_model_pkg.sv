// tb_model_pkg: integer reference model of the complete classifier, used by
// the end-to-end testbenches. It mirrors the algorithm, not the RTL: per
// frame it filters four EMG samples and one sample of each EEG channel
// (64-tap FIR, coefficients from tb_coef_pkg, 16-bit sum, >>> 7, saturation),
// averages |FIR output| over 512-entry windows written on every 4th frame,
// forms hippocampus / cortex by integer division (0 divisor -> 255) and
// counts local maxima of the theta-band output above zero.
package tb_model_pkg;
  import tb_coef_pkg::*;

  class sleep_ref_model;
    int hist [3][64];     // hist[c][0] newest
    int win  [3][512];
    int wptr [3];
    int cf   [3][64];
    int avg  [3];
    int p1, p2;
    int peaks;
    int stride;

    function new(int avg_stride = 4);
      stride = avg_stride;
      peaks = 0; p1 = 0; p2 = 0;
      for (int c = 0; c < 3; c++) begin
        wptr[c] = 0; avg[c] = 0;
        for (int i = 0; i < 64; i++) begin
          hist[c][i] = 0;
          cf[c][i] = coef(c, i < 32 ? i : 63 - i);
        end
        for (int i = 0; i < 512; i++) win[c][i] = 0;
      end
    endfunction

    static function int sat8(int v);
      return v > 127 ? 127 : (v < -128 ? -128 : v);
    endfunction

    function int fir(int c, int x);
      int sum;
      logic signed [15:0] s16, sh;
      for (int i = 63; i > 0; i--) hist[c][i] = hist[c][i-1];
      hist[c][0] = x;
      sum = 0;
      for (int i = 0; i < 64; i++) sum += cf[c][i] * hist[c][i];
      s16 = 16'(sum);
      sh  = s16 >>> 7;
      return sat8(int'(sh));
    endfunction

    function int average(int c, int y, bit wr);
      int sum, m;
      if (wr) begin
        m = (y < 0) ? -y : y;
        if (m > 127) m = 127;
        win[c][wptr[c]] = m;
        wptr[c] = (wptr[c] + 1) % 512;
      end
      sum = 0;
      for (int i = 0; i < 512; i++) sum += win[c][i];
      return int'(16'(sum)) >> 9;
    endfunction

    // frame j: four EMG samples, one EEG1 and one EEG2 sample; returns ratio
    function int frame(int j, int emg [4], int eeg1, int eeg2);
      int y, q;
      bit wr;
      wr = (j % stride == 0);
      y = fir(2, emg[0]);
      y = fir(2, emg[1]);
      y = fir(2, emg[2]);
      y = fir(2, emg[3]);
      avg[2] = average(2, y, wr);
      y = fir(0, eeg1);
      avg[0] = average(0, y, wr);
      y = fir(1, eeg2);
      if (p1 > p2 && y <= p1 && p1 > 0) peaks++;
      p2 = p1; p1 = y;
      avg[1] = average(1, y, wr);
      q = (avg[0] == 0) ? 255 : avg[1] / avg[0];
      return q;
    endfunction

    function int stage(int q, int vth_emg, int vth_ratio);
      return (avg[2] > vth_emg) ? 0 : ((q > vth_ratio) ? 2 : 1);
    endfunction
  endclass

endpackage
