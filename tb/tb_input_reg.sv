// tb_input_reg: checks that the sample register keeps the ten most
// significant bits of the ADC word on each strobe, raises valid for exactly
// one cycle after it and holds its sample between strobes.
module tb_input_reg;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] adc_data = '0;
  logic [9:0]  sample;
  logic        valid;
  int checks = 0, failures = 0;
  logic [9:0] exp_sample;

  input_reg dut (.clk, .rst_n, .en, .adc_data, .sample, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en       = ($urandom_range(0, 3) == 0);
      adc_data = 16'($urandom);
      @(posedge clk);
      if (en) exp_sample = adc_data[15:6];
      #1;
      checks++;
      if (valid !== en || sample !== exp_sample) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0d: en=%b valid=%b sample=%h exp=%h", i, en, valid, sample, exp_sample);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
