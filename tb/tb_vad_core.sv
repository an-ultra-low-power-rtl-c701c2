// tb_vad_core: runs the detector at its default sizes (10-bit samples,
// 256-sample frames) on a synthetic signal of noise and tone bursts whose
// DC level jumps halfway, and checks, frame by frame, the speech decision,
// the frame's crossing count and the learnt DC offset against the
// reference model, the total number of crossings, and that each decision
// comes two clocks after the strobe of the frame's last sample.
module tb_vad_core;
  import vad_pkg::*;
  import vad_ref_pkg::*;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [15:0] adc_data = '0;
  vad_cfg_t cfg;
  logic speech, decided, zc_pulse, zc_fall;
  logic [CNT_W-1:0] frame_zc_count;
  logic [SAMPLE_W-1:0] dc_offset;
  int checks = 0, failures = 0;
  int n_zc = 0, exp_zc = 0, n_dec = 0, n_speech = 0;
  int cyc = 0, last_end_cyc = 0;
  vad_model m;
  typedef struct { bit d; int cnt; int off; } exp_t;
  exp_t q[$];

  vad_core dut (.clk, .rst_n, .sample_en, .adc_data, .cfg, .speech, .decided,
                .frame_zc_count, .dc_offset, .zc_pulse, .zc_fall);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1 = speech frame
  bit plan[12] = '{0, 0, 1, 1, 0, 1, 0, 0, 1, 1, 1, 0};

  initial begin
    int n;
    cfg = '{trig_hi: TRIG_HI_DEFAULT, trig_lo: TRIG_LO_DEFAULT, zc_thr: CNT_W'(ZC_THR_DEFAULT)};
    m = new(FRAME_LEN, TRIG_HI_DEFAULT, TRIG_LO_DEFAULT, ZC_THR_DEFAULT, OFFSET_INIT);
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    foreach (plan[f]) begin
      for (int s = 0; s < FRAME_LEN; s++) begin
        int x;
        x = gen_sample(n, (f < 6) ? 620 : 430, plan[f] ? 150 : 0, 6);
        n++;
        for (int k = 0; k < 3; k++) begin
          @(negedge clk);
          sample_en = (k == 0);
          adc_data  = (k == 0) ? {10'(x), 6'($urandom)} : 16'($urandom);
          if (zc_pulse) n_zc++;
          if (decided) begin
            checks++;
            if (q.size() == 0) begin failures++; $display("decision without a frame"); end
            else begin
              exp_t e;
              e = q.pop_front();
              n_dec++;
              if (speech) n_speech++;
              if (speech !== e.d || frame_zc_count !== CNT_W'(e.cnt) ||
                  dc_offset !== SAMPLE_W'(e.off) || cyc - last_end_cyc != 2) begin
                failures++;
                $display("frame %0d: speech=%b/%b count=%0d/%0d offset=%0d/%0d latency=%0d",
                         n_dec, speech, e.d, frame_zc_count, e.cnt, dc_offset, e.off, cyc - last_end_cyc);
              end else
                $display("frame %0d: speech=%b crossings=%0d offset=%0d", n_dec, speech, frame_zc_count, dc_offset);
            end
          end
          if (k == 0) begin
            exp_zc += m.step(x);
            if (m.frame_done) begin
              exp_t e;
              e.d = m.decision; e.cnt = m.last_count; e.off = m.offset;
              q.push_back(e);
              last_end_cyc = cyc;
            end
          end
        end
      end
    end
    repeat (6) begin
      @(negedge clk);
      sample_en = 0;
      if (zc_pulse) n_zc++;
      if (decided) begin
        exp_t e;
              e = q.pop_front();
        checks++; n_dec++;
        if (speech) n_speech++;
        if (speech !== e.d || frame_zc_count !== CNT_W'(e.cnt) || dc_offset !== SAMPLE_W'(e.off)) begin
          failures++; $display("last frame mismatch");
        end
      end
    end
    checks += 3;
    if (n_dec != $size(plan)) begin failures++; $display("decisions %0d", n_dec); end
    if (n_zc != exp_zc) begin failures++; $display("crossings %0d expected %0d", n_zc, exp_zc); end
    if (n_speech != 6) begin failures++; $display("speech frames %0d expected 6", n_speech); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
