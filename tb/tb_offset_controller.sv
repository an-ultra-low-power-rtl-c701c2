// tb_offset_controller: feeds 256-sample frames around drifting DC levels
// and checks that after each frame the offset equals the truncated mean of
// that frame's samples, that it holds in between, and that it starts at
// mid-scale.
module tb_offset_controller;
  logic clk = 0, rst_n = 0, valid = 0, frame_end = 0;
  logic [9:0] sample = '0, offset;
  logic updated;
  int checks = 0, failures = 0, n = 0, sum = 0, exp_off = 512, changes = 0;

  offset_controller dut (.clk, .rst_n, .valid, .sample, .frame_end, .offset, .updated);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dc;
    bit was_end;
    repeat (3) @(posedge clk);
    rst_n = 1;
    dc = 300;
    was_end = 0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      checks++;
      if (offset !== 10'(exp_off) || updated !== was_end) begin
        failures++;
        if (failures < 10) $display("mismatch: offset=%0d exp=%0d updated=%b", offset, exp_off, updated);
      end
      valid     = ($urandom_range(0, 3) != 0);
      sample    = 10'(dc + $urandom_range(0, 200) - 100);
      if (i > 59000) sample = 10'(1023);                 // full-scale frame: no overflow
      frame_end = valid && (n % 256 == 255);
      was_end   = frame_end;
      if (valid) begin
        sum += int'(sample);
        n++;
        if (frame_end) begin
          if (sum / 256 != exp_off) changes++;
          exp_off = sum / 256;
          sum = 0;
          dc  = $urandom_range(100, 900);
        end
      end
    end
    checks++;
    if (changes < 5) begin failures++; $display("offset hardly changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
