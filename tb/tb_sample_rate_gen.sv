// tb_sample_rate_gen: runs the rate generator at its default 100 kHz clock
// for one simulated second in each mode and checks 2000 VAD strobes exactly
// 50 clocks apart, 16000 main-rate strobes no more than 7 clocks apart, and
// the ADC strobe at 2 kHz in low-rate mode and 16 kHz in high-rate mode.
module tb_sample_rate_gen;
  logic clk = 0, rst_n = 0, high_rate = 0;
  logic vad_tick, main_tick, adc_start;
  int checks = 0, failures = 0;

  sample_rate_gen dut (.clk, .rst_n, .high_rate, .vad_tick, .main_tick, .adc_start);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_second(bit hr);
    int n_vad = 0, n_main = 0, n_adc = 0, last_vad = -1, last_main = -1;
    high_rate = hr;
    for (int c = 0; c < 100000; c++) begin
      @(negedge clk);
      if (vad_tick) begin
        if (last_vad >= 0) begin
          checks++;
          if (c - last_vad != 50) begin failures++; $display("VAD strobe spacing %0d", c - last_vad); end
        end
        last_vad = c;
        n_vad++;
        checks++;
        if (!main_tick) begin failures++; $display("VAD strobe off the main grid"); end
      end
      if (main_tick) begin
        if (last_main >= 0 && (c - last_main < 6 || c - last_main > 7)) begin
          failures++; $display("main strobe spacing %0d", c - last_main);
        end
        last_main = c;
        n_main++;
      end
      if (adc_start) n_adc++;
      checks++;
      if (adc_start !== (hr ? main_tick : vad_tick)) failures++;
    end
    checks += 3;
    if (n_vad != 2000)  begin failures++; $display("VAD strobes %0d", n_vad); end
    if (n_main != 16000) begin failures++; $display("main strobes %0d", n_main); end
    if (n_adc != (hr ? 16000 : 2000)) begin failures++; $display("ADC strobes %0d", n_adc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run_second(1'b0);
    run_second(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
