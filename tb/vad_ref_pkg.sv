// vad_ref_pkg: reference model of the zero-crossing VAD for the testbenches.
//
// Written with plain integer arithmetic, independently of the RTL: it keeps
// the DC offset, the trigger arming state, the per-frame crossing count and
// sample sum, and the speech decision. `step` takes one 10-bit sample and
// returns whether it was a crossing; `frame_done` is set when the sample
// closed a frame, and then `decision`, `last_count` and `offset` hold the
// values the hardware must show after that frame.
package vad_ref_pkg;

  // Test signal, in 10-bit ADC codes: a DC level, uniform noise of
  // +-noise codes and, in speech, a tone of the given amplitude whose pitch
  // wanders between 150 and 650 Hz at the 2 kHz sampling rate.
  function automatic int gen_sample(int n, int dc, int amp, int noise);
    real ph, f;
    int x;
    f  = 400.0 + 250.0 * $sin(6.2831853 * n / 3000.0);
    ph = 6.2831853 * f * n / 2000.0;
    x  = dc + int'(amp * $sin(ph)) + $urandom_range(0, 2 * noise) - noise;
    if (x < 0) x = 0;
    if (x > 1023) x = 1023;
    return x;
  endfunction

  class vad_model;
    int frame_len;
    int trig_hi, trig_lo, thr;
    int offset;
    int arm;          // 0 none, 1 above the high trigger, -1 below the low one
    int count, sum, idx;
    bit decision;
    int last_count;
    bit frame_done;
    bit last_fall;

    function new(int frame_len, int trig_hi, int trig_lo, int thr, int offset_init);
      this.frame_len = frame_len;
      this.trig_hi   = trig_hi;
      this.trig_lo   = trig_lo;
      this.thr       = thr;
      this.offset    = offset_init;
      arm = 0; count = 0; sum = 0; idx = 0; decision = 0; last_count = 0;
      frame_done = 0; last_fall = 0;
    endfunction

    function bit step(int x);
      int d;
      bit z;
      d = x - offset;
      z = 0;
      last_fall = 0;
      if (arm == 1 && d <= 0) begin
        z = 1; last_fall = 1;
        arm = (d < -trig_lo) ? -1 : 0;
      end else if (arm == -1 && d >= 0) begin
        z = 1;
        arm = (d > trig_hi) ? 1 : 0;
      end else if (arm == 0) begin
        if (d > trig_hi)       arm = 1;
        else if (d < -trig_lo) arm = -1;
      end
      count += z;
      sum   += x;
      idx++;
      frame_done = (idx == frame_len);
      if (frame_done) begin
        offset     = sum / frame_len;
        decision   = (count >= thr);
        last_count = count;
        count = 0; sum = 0; idx = 0;
      end
      return z;
    endfunction
  endclass

endpackage
