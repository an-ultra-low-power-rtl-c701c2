// tb_zero_cross: drives the zero-crossing detector with random waveforms of
// varying amplitude around a varying offset and compares every crossing,
// its direction and the offset-corrected sample with the reference model.
// Also checks a hand-worked sequence, and that wiggles which never pass a
// trigger line give no crossing.
module tb_zero_cross;
  import vad_ref_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [9:0] sample = '0, offset = 10'd512, trig_hi = 10'd16, trig_lo = 10'd16;
  logic zc, zc_fall;
  logic signed [10:0] diff;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;
  vad_model m;

  zero_cross dut (.clk, .rst_n, .valid, .sample, .offset, .trig_hi, .trig_lo, .zc, .zc_fall, .diff);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, bit v, output bit z);
    @(negedge clk);
    valid  = v;
    sample = 10'(x);
    #1;
    z = zc;
  endtask

  task automatic check_one(int x, bit v);
    bit exp_z, exp_f, got;
    exp_z = 0; exp_f = 0;
    if (v) begin
      exp_z = m.step(x);
      exp_f = m.last_fall;
    end
    apply(x, v, got);
    checks++;
    if (zc !== exp_z || zc_fall !== exp_f || diff !== 11'(x - int'(offset))) begin
      failures++;
      if (failures < 10)
        $display("mismatch x=%0d off=%0d v=%b zc=%b/%b fall=%b/%b diff=%0d", x, offset, v, zc, exp_z, zc_fall, exp_f, diff);
    end
    if (zc && !zc_fall) n_rise++;
    if (zc && zc_fall)  n_fall++;
  endtask

  // Hand-worked sequence around offset 512 with triggers 16/16:
  // 520 (inside), 530 (above high: arm), 515, 512 (crossing from above),
  // 500, 490 (below low: arm), 513 (crossing from below), 600 (arm high),
  // 400 (crossing, and at once armed low), 700 (crossing from below).
  int seq_x[10] = '{520, 530, 515, 512, 500, 490, 513, 600, 400, 700};
  bit seq_z[10] = '{0,   0,   0,   1,   0,   0,   1,   0,   1,   1};

  initial begin
    bit z;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (seq_x[i]) begin
      apply(seq_x[i], 1'b1, z);
      checks++;
      if (z !== seq_z[i]) begin
        failures++;
        $display("hand sequence step %0d: zc=%b expected %b", i, z, seq_z[i]);
      end
    end
    // back to a known state: go above, cross, rest inside the triggers
    apply(600, 1, z); apply(512, 1, z);
    m = new(1 << 30, 16, 16, 8, 512);  // no frame end: the offset is driven here

    // Small wiggles that never pass a trigger: no crossing at all
    for (int i = 0; i < 200; i++) begin
      check_one(512 + $urandom_range(0, 30) - 15, 1'b1);
      checks++;
      if (zc) begin failures++; $display("crossing from a wiggle"); end
    end

    // Random waveforms, offsets and triggers
    for (int blk = 0; blk < 40; blk++) begin
      int amp, per, dc;
      @(negedge clk);
      valid   = 1'b0;
      offset  = 10'($urandom_range(200, 800));
      trig_hi = 10'($urandom_range(0, 60));
      trig_lo = 10'($urandom_range(0, 60));
      m.offset = int'(offset); m.trig_hi = int'(trig_hi); m.trig_lo = int'(trig_lo);
      amp = $urandom_range(5, 180);
      per = $urandom_range(4, 30);
      dc  = int'(offset) + $urandom_range(0, 20) - 10;
      for (int t = 0; t < 400; t++) begin
        int x, ph;
        ph = t % per;
        x  = dc + ((ph < per / 2) ? amp : -amp) * (ph % (per / 2 + 1)) / (per / 2 + 1)
                + $urandom_range(0, 16) - 8;
        if (x < 0) x = 0;
        if (x > 1023) x = 1023;
        check_one(x, $urandom_range(0, 4) != 0);
      end
    end
    checks++;
    if (n_rise == 0 || n_fall == 0) begin
      failures++;
      $display("crossings in one direction never seen: rise=%0d fall=%0d", n_rise, n_fall);
    end
    $display("crossings seen: %0d rising, %0d falling", n_rise, n_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
