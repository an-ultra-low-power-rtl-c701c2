// tb_vad_top: end-to-end test of the always-on node circuit with every
// parameter at its default (100 kHz clock, 2 kHz VAD rate, 16 kHz main
// rate, 10-bit samples, 256-sample frames).
//
// The testbench plays the ADC: whenever the VAD takes a sample it presents
// the next sample of a synthetic signal (noise, tone bursts, a jump of the
// DC level and a loud-noise frame) in the top bits of the 16-bit word. A
// reference model runs on the same samples. Checked are: every frame
// decision, crossing count and DC offset; the frame period of 12800 clocks
// (256 samples x 50 clocks); the power enables and the rate select
// following the decision one clock later with one wake or sleep pulse per
// change; and exactly 2048 ADC strobes per frame while powered up and 256
// while idle. Each mechanism (crossings in both directions, offset renewal,
// speech onset and end, wake, sleep, both ADC rates) must happen at least
// once.
module tb_vad_top;
  import vad_pkg::*;
  import vad_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data = '0;
  vad_cfg_t cfg;
  logic adc_start, sample_tick, speech, high_rate, wake, sleep, decided, zc_pulse, zc_fall;
  pwr_en_t pwr_en;
  logic [CNT_W-1:0] frame_zc_count;
  logic [SAMPLE_W-1:0] dc_offset;

  int checks = 0, failures = 0;
  int cyc = 0;
  vad_model m;
  typedef struct { bit d; int cnt; int off; } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_zc_rise = 0, n_zc_fall = 0, n_offset_renew = 0, n_onset = 0, n_end = 0;
  int n_wake = 0, n_sleep = 0, n_hi_frames = 0, n_lo_frames = 0, n_noise_rejected = 0;

  vad_top dut (.clk, .rst_n, .adc_data, .cfg, .adc_start, .sample_tick, .speech, .pwr_en,
               .high_rate, .wake, .sleep, .decided, .frame_zc_count, .dc_offset,
               .zc_pulse, .zc_fall);

  always #5 clk = ~clk;

  // frame plan: 0 quiet, 1 speech, 2 loud noise still inside the triggers
  int plan[14] = '{0, 0, 1, 1, 0, 2, 1, 0, 0, 1, 1, 1, 0, 0};
  localparam int CYC_PER_FRAME = FRAME_LEN * (CLK_HZ / VAD_FS);

  initial begin
    repeat (CYC_PER_FRAME * 16) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, f, s, last_dec, adc_cnt, prev_off;
    bit prev_speech, prev_on, hr_now;
    cfg = '{trig_hi: TRIG_HI_DEFAULT, trig_lo: TRIG_LO_DEFAULT, zc_thr: CNT_W'(ZC_THR_DEFAULT)};
    m = new(FRAME_LEN, TRIG_HI_DEFAULT, TRIG_LO_DEFAULT, ZC_THR_DEFAULT, OFFSET_INIT);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    n = 0; last_dec = -1; adc_cnt = 0; prev_off = OFFSET_INIT;
    prev_speech = 0; prev_on = 0;
    while (n < $size(plan) * FRAME_LEN || q.size() != 0) begin
      @(negedge clk);
      cyc++;
      // power state follows the decision one clock later
      checks++;
      if (pwr_en !== {4{prev_speech}} || high_rate !== prev_speech ||
          wake !== (prev_speech && !prev_on) || sleep !== (!prev_speech && prev_on)) begin
        failures++;
        $display("power state wrong at cycle %0d", cyc);
      end
      if (wake) n_wake++;
      if (sleep) n_sleep++;
      prev_on = prev_speech;
      prev_speech = speech;
      hr_now = high_rate;
      if (adc_start) adc_cnt++;
      if (zc_pulse &&  zc_fall) n_zc_fall++;
      if (zc_pulse && !zc_fall) n_zc_rise++;
      if (decided) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (speech !== e.d || frame_zc_count !== CNT_W'(e.cnt) || dc_offset !== SAMPLE_W'(e.off)) begin
          failures++;
          $display("frame mismatch: speech=%b/%b count=%0d/%0d offset=%0d/%0d",
                   speech, e.d, frame_zc_count, e.cnt, dc_offset, e.off);
        end
        if (last_dec >= 0) begin
          checks += 2;
          if (cyc - last_dec != CYC_PER_FRAME) begin
            failures++; $display("frame period %0d", cyc - last_dec);
          end
          // ADC strobes over the frame just ended, at the rate set one clock
          // after the previous decision
          if (adc_cnt != (prev_on ? 2048 : 256)) begin
            failures++; $display("ADC strobes per frame %0d (high_rate=%b)", adc_cnt, prev_on);
          end
          if (prev_on) n_hi_frames++; else n_lo_frames++;
        end
        adc_cnt = 0;
        last_dec = cyc;
        if (speech && !prev_on) n_onset++;
        if (!speech && prev_on) n_end++;
        if (dc_offset != SAMPLE_W'(prev_off)) n_offset_renew++;
        prev_off = dc_offset;
        $display("frame: speech=%b crossings=%0d offset=%0d", speech, frame_zc_count, dc_offset);
      end
      // act as the ADC: the VAD takes adc_data at the coming clock edge
      if (sample_tick) begin
        int x, kind, dc;
        f = n / FRAME_LEN;
        kind = (f < $size(plan)) ? plan[f] : 0;
        dc = (f < 8) ? 600 : 380;
        x = gen_sample(n, dc, (kind == 1) ? 140 : 0, (kind == 2) ? 15 : 5);
        adc_data = {10'(x), 6'($urandom)};
        if (n < $size(plan) * FRAME_LEN) begin
          void'(m.step(x));
          if (m.frame_done) begin
            exp_t e;
            e.d = m.decision; e.cnt = m.last_count; e.off = m.offset;
            q.push_back(e);
            if (kind == 2 && !m.decision) n_noise_rejected++;
          end
        end
        n++;
      end else begin
        adc_data = 16'($urandom);
      end
    end
    // every mechanism must have happened
    checks += 10;
    if (n_zc_rise == 0)        begin failures++; $display("no rising crossing"); end
    if (n_zc_fall == 0)        begin failures++; $display("no falling crossing"); end
    if (n_offset_renew == 0)   begin failures++; $display("offset never renewed"); end
    if (n_onset == 0)          begin failures++; $display("no speech onset"); end
    if (n_end == 0)            begin failures++; $display("no speech end"); end
    if (n_wake == 0)           begin failures++; $display("no wake"); end
    if (n_sleep == 0)          begin failures++; $display("no sleep"); end
    if (n_hi_frames == 0)      begin failures++; $display("no high-rate frame"); end
    if (n_lo_frames == 0)      begin failures++; $display("no low-rate frame"); end
    if (n_noise_rejected == 0) begin failures++; $display("loud noise frame not rejected"); end
    $display("mechanisms: zc_rise=%0d zc_fall=%0d offset_renew=%0d onset=%0d end=%0d wake=%0d sleep=%0d hi_frames=%0d lo_frames=%0d noise_rejected=%0d",
             n_zc_rise, n_zc_fall, n_offset_renew, n_onset, n_end, n_wake, n_sleep, n_hi_frames, n_lo_frames, n_noise_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
