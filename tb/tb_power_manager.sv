// tb_power_manager: toggles the speech input and checks that every
// controlled domain and the rate select follow it one clock later, that
// wake and sleep pulse once per edge, and that everything is off after
// reset.
module tb_power_manager;
  import vad_pkg::*;
  logic clk = 0, rst_n = 0, speech = 0;
  pwr_en_t pwr_en;
  logic high_rate, wake, sleep;
  int checks = 0, failures = 0, n_wake = 0, n_sleep = 0, exp_wake = 0, exp_sleep = 0;
  bit prev = 0;

  power_manager dut (.clk, .rst_n, .speech, .pwr_en, .high_rate, .wake, .sleep);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev2;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (pwr_en !== '0 || high_rate !== 0) begin failures++; $display("not off after reset"); end
    rst_n = 1;
    prev2 = 0;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      // values after the edge that registered `prev`
      checks++;
      if (pwr_en !== {4{prev}} || high_rate !== prev ||
          wake !== (prev && !prev2) || sleep !== (!prev && prev2)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: pwr=%b hr=%b wake=%b sleep=%b", i, pwr_en, high_rate, wake, sleep);
      end
      if (wake) n_wake++;
      if (sleep) n_sleep++;
      if (prev && !prev2) exp_wake++;
      if (!prev && prev2) exp_sleep++;
      prev2 = prev;
      if ($urandom_range(0, 9) == 0) speech = ~speech;
      prev = speech;
    end
    checks++;
    if (n_wake != exp_wake || n_sleep != exp_sleep || n_wake == 0) begin
      failures++; $display("wake %0d/%0d sleep %0d/%0d", n_wake, exp_wake, n_sleep, exp_sleep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
