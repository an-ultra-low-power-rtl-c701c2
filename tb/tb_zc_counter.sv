// tb_zc_counter: feeds random crossing pulses in 256-sample frames and
// checks the running count and the frame total, which must include the
// last sample's crossing and restart from zero in the next frame.
module tb_zc_counter;
  logic clk = 0, rst_n = 0, valid = 0, zc = 0, frame_end = 0;
  logic [8:0] count, frame_count;
  int checks = 0, failures = 0, n = 0, ref_cnt = 0, frames = 0;

  zc_counter dut (.clk, .rst_n, .valid, .zc, .frame_end, .count, .frame_count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int density;
    repeat (3) @(posedge clk);
    rst_n = 1;
    density = 2;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      valid     = ($urandom_range(0, 3) != 0);
      zc        = ($urandom_range(0, density) == 0);
      frame_end = valid && (n % 256 == 255);
      #1;
      checks++;
      if (count !== 9'(ref_cnt) || frame_count !== 9'(ref_cnt + (valid && zc))) begin
        failures++;
        if (failures < 10) $display("mismatch: count=%0d/%0d frame_count=%0d", count, ref_cnt, frame_count);
      end
      if (valid) begin
        ref_cnt += zc;
        n++;
        if (frame_end) begin
          ref_cnt = 0;
          frames++;
          density = (frames % 3 == 0) ? 0 : $urandom_range(1, 20); // 0: a crossing on every sample
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
