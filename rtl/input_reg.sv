// input_reg: sample register at the input of the VAD.
//
// The ADC delivers a 16-bit word; the VAD needs only 10 bits per sample at
// 2 kHz. On each sample strobe `en` the register keeps the OUT_W most
// significant bits of `adc_data` (the ADC code is taken as offset binary,
// i.e. unsigned) and raises `valid` for one clock in the following cycle,
// together with the new `sample`. Between strobes the register holds its
// value, so the rest of the VAD sees one sample per strobe.
//
// The bus widths and the 2 kHz capture rate follow the design description;
// keeping the top bits and the one-cycle valid pulse are this design's
// choices.
module input_reg #(
  parameter int unsigned IN_W  = vad_pkg::ADC_W,
  parameter int unsigned OUT_W = vad_pkg::SAMPLE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // sample strobe, one clock wide
  input  logic [IN_W-1:0]  adc_data,  // ADC output word
  output logic [OUT_W-1:0] sample,    // reduced sample
  output logic             valid      // one clock after a strobe
);

  initial assert (OUT_W <= IN_W) else $fatal(1, "OUT_W must not exceed IN_W");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= en;
      if (en) sample <= adc_data[IN_W-1 -: OUT_W];
    end
  end

endmodule
