// sample_rate_gen: sampling-rate control circuit.
//
// Derives the ADC conversion strobe and the VAD sample strobe from the
// system clock. A phase accumulator adds MAIN_FS each clock and emits a
// main-rate tick whenever it passes CLK_HZ, so the average tick rate is
// exactly MAIN_FS even when CLK_HZ is not a multiple of it (100 kHz /
// 16 kHz). Every (MAIN_FS / VAD_FS)-th main tick is also a VAD tick.
//
//   vad_tick  : VAD_FS strobe, one clock wide, always running
//   adc_start : conversion strobe to the ADC, at MAIN_FS while `high_rate`
//               is set (speech present, main processor running) and at
//               VAD_FS otherwise, when only the VAD needs samples
//
// The two rates (16 kHz for the main processor, 2 kHz for the VAD) and
// the lowering of the sampling rate while no speech is present follow the
// design description; the phase-accumulator circuit is this design's own.
module sample_rate_gen #(
  parameter int unsigned CLK_HZ  = vad_pkg::CLK_HZ,
  parameter int unsigned MAIN_FS = vad_pkg::MAIN_FS,
  parameter int unsigned VAD_FS  = vad_pkg::VAD_FS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic high_rate,   // select MAIN_FS for the ADC
  output logic vad_tick,
  output logic main_tick,
  output logic adc_start
);

  localparam int unsigned RATIO = MAIN_FS / VAD_FS;
  localparam int unsigned ACC_W = $clog2(CLK_HZ + MAIN_FS + 1);
  localparam int unsigned SUB_W = (RATIO > 1) ? $clog2(RATIO) : 1;

  initial begin
    assert (CLK_HZ >= MAIN_FS) else $fatal(1, "CLK_HZ must be at least MAIN_FS");
    assert (RATIO >= 1 && RATIO * VAD_FS == MAIN_FS)
      else $fatal(1, "MAIN_FS must be a multiple of VAD_FS");
  end

  logic [ACC_W-1:0] acc_q, acc_sum;
  logic [SUB_W-1:0] sub_q;

  assign acc_sum   = acc_q + ACC_W'(MAIN_FS);
  assign main_tick = acc_sum >= ACC_W'(CLK_HZ);
  assign vad_tick  = main_tick && (sub_q == '0);
  assign adc_start = high_rate ? main_tick : vad_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      sub_q <= '0;
    end else begin
      acc_q <= main_tick ? acc_sum - ACC_W'(CLK_HZ) : acc_sum;
      if (main_tick) sub_q <= (sub_q == SUB_W'(RATIO - 1)) ? '0 : sub_q + 1'b1;
    end
  end

endmodule
