// tb_frame_counter: drives random sample strobes and checks that the end of
// a frame is flagged on exactly every 256th sample, and the sample index.
module tb_frame_counter;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [7:0] index;
  logic frame_end;
  int checks = 0, failures = 0, n = 0, frames = 0;

  frame_counter dut (.clk, .rst_n, .valid, .index, .frame_end);

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
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (index !== 8'(n % 256) || frame_end !== (valid && (n % 256 == 255))) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d index=%0d frame_end=%b", n, index, frame_end);
      end
      if (frame_end) frames++;
      if (valid) n++;
    end
    checks++;
    if (frames != n / 256) begin
      failures++;
      $display("frames=%0d expected %0d", frames, n / 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
