// tb_judge: gives random frame counts and thresholds and checks the speech
// state, the held count and the decision pulse, including counts equal to
// the threshold.
module tb_judge;
  logic clk = 0, rst_n = 0, frame_end = 0;
  logic [8:0] frame_count = '0, zc_thr = 9'd8, last_count;
  logic speech, decided;
  int checks = 0, failures = 0;
  bit exp_speech = 0, exp_dec = 0;
  int exp_last = 0;

  judge dut (.clk, .rst_n, .frame_end, .frame_count, .zc_thr, .speech, .last_count, .decided);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (speech !== exp_speech || decided !== exp_dec || last_count !== 9'(exp_last)) begin
        failures++;
        if (failures < 10) $display("mismatch: speech=%b/%b decided=%b/%b", speech, exp_speech, decided, exp_dec);
      end
      frame_end   = ($urandom_range(0, 5) == 0);
      zc_thr      = 9'($urandom_range(0, 40));
      frame_count = (i % 7 == 0) ? zc_thr : 9'($urandom_range(0, 60));
      exp_dec     = frame_end;
      if (frame_end) begin
        exp_speech = (frame_count >= zc_thr);
        exp_last   = frame_count;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
