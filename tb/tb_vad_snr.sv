// tb_vad_snr: the detector on 15 minutes of signal (1,800,000 samples at
// 2 kHz, 7,031 frames of 256) for each of five signal-to-noise ratios,
// -20, -10, 0, 10 and 20 dB, at its default sizes.
//
// The signal is synthetic: bursts of a wandering tone (speech stand-in) of
// 1 to 12 frames separated by pauses of 1 to 12 frames, plus Gaussian noise
// scaled to the chosen S/N, around a DC level of 500 codes. Every frame
// decision, crossing count and DC offset is compared with the reference
// model. Against the frame labels the testbench also tallies correct
// decisions, false acceptances (speech reported in a pause) and false
// rejections (pause reported in speech) and prints them per condition;
// these depend on the trigger and threshold settings and are reported,
// not checked. The strobe comes every second clock to keep the run short;
// the detector's timing does not depend on the strobe spacing.
module tb_vad_snr;
  import vad_pkg::*;
  import vad_ref_pkg::*;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [15:0] adc_data = '0;
  vad_cfg_t cfg;
  logic speech, decided, zc_pulse, zc_fall;
  logic [CNT_W-1:0] frame_zc_count;
  logic [SAMPLE_W-1:0] dc_offset;
  int checks = 0, failures = 0;

  localparam int FRAMES = 1_800_000 / FRAME_LEN;   // 15 minutes at 2 kHz
  localparam int AMP    = 40;                      // tone amplitude, codes

  vad_core dut (.clk, .rst_n, .sample_en, .adc_data, .cfg, .speech, .decided,
                .frame_zc_count, .dc_offset, .zc_pulse, .zc_fall);

  always #5 clk = ~clk;

  initial begin
    repeat (5 * FRAMES * FRAME_LEN * 2 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real g = 0.0;
    for (int i = 0; i < 12; i++) g += $urandom_range(0, 65535) / 65536.0;
    return g - 6.0;
  endfunction

  int snr_db[5] = '{20, 10, 0, -10, -20};

  initial begin
    vad_model m;
    bit label[$];
    int n, run_left, correct, fa, fr, n_sp, n_ns, dec_frames;
    bit in_speech;
    real sigma;
    cfg = '{trig_hi: TRIG_HI_DEFAULT, trig_lo: TRIG_LO_DEFAULT, zc_thr: CNT_W'(ZC_THR_DEFAULT)};
    foreach (snr_db[c]) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      m = new(FRAME_LEN, TRIG_HI_DEFAULT, TRIG_LO_DEFAULT, ZC_THR_DEFAULT, OFFSET_INIT);
      // tone power AMP^2/2, noise power sigma^2
      sigma = AMP / $sqrt(2.0) / (10.0 ** (snr_db[c] / 20.0));
      n = 0; run_left = 0; in_speech = 1;
      correct = 0; fa = 0; fr = 0; n_sp = 0; n_ns = 0; dec_frames = 0;
      label.delete();
      for (int f = 0; f < FRAMES; f++) begin
        if (run_left == 0) begin
          in_speech = !in_speech;
          run_left  = $urandom_range(1, 12);
        end
        run_left--;
        label.push_back(in_speech);
        for (int s = 0; s < FRAME_LEN; s++) begin
          int x;
          x = gen_sample(n, 500, in_speech ? AMP : 0, 0) + int'(sigma * gauss());
          if (x < 0) x = 0;
          if (x > 1023) x = 1023;
          n++;
          for (int k = 0; k < 2; k++) begin
            @(negedge clk);
            sample_en = (k == 0);
            adc_data  = {10'(x), 6'd0};
            if (decided) begin
              bit lab;
              lab = label.pop_front();
              dec_frames++;
              checks++;
              if (speech !== m.decision || frame_zc_count !== CNT_W'(m.last_count) ||
                  dc_offset !== SAMPLE_W'(m.offset)) begin
                failures++;
                if (failures < 10) $display("S/N %0d dB frame %0d: mismatch with the model", snr_db[c], dec_frames);
              end
              if (lab) n_sp++; else n_ns++;
              if (speech == lab) correct++;
              else if (speech) fa++;
              else fr++;
            end
            if (k == 0) void'(m.step(x));
          end
        end
      end
      repeat (4) begin
        @(negedge clk);
        sample_en = 0;
        if (decided) begin
          bit lab;
          lab = label.pop_front();
          dec_frames++;
          checks++;
          if (speech !== m.decision) failures++;
          if (lab) n_sp++; else n_ns++;
          if (speech == lab) correct++; else if (speech) fa++; else fr++;
        end
      end
      checks++;
      if (dec_frames != FRAMES) begin failures++; $display("decisions %0d of %0d", dec_frames, FRAMES); end
      $display("S/N %3d dB: %0d frames, correct %0.1f%%, FAR %0.1f%% of %0d pauses, FRR %0.1f%% of %0d speech frames",
               snr_db[c], dec_frames, 100.0 * correct / dec_frames, 100.0 * fa / n_ns, n_ns, 100.0 * fr / n_sp, n_sp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
