// vad_top: always-on part of a speech sensor node.
//
// A sensor node with a microphone array, an ADC, a microprocessor and a
// radio draws far more than a button cell can supply all day. This block
// is the small circuit that stays powered: a zero-crossing voice activity
// detector fed at 2 kHz with 10-bit samples, and a power manager that
// supplies the main ADC, memory, signal-processing module and main
// application module only while the detector reports speech, raising the
// ADC rate to 16 kHz for them.
//
//   sample_rate_gen -> adc_start (to the ADC), vad_tick (to the VAD)
//   adc_data -> vad_core -> speech -> power_manager -> pwr_en, high_rate
//                                                   -> sample_rate_gen
//
// Interface: `adc_data` is the ADC's output word, taken by the VAD on each
// `sample_tick`; `adc_start` asks the ADC for a conversion. `cfg` holds the
// trigger levels and the decision threshold. The decision changes once per
// frame (256 samples, 128 ms at 2 kHz); the power enables follow it one
// clock later.
//
// The structure follows the design description's node diagram and VAD
// block diagram; the strobe interface to the ADC and the observation
// outputs are this design's choices.
module vad_top
  import vad_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADC_W-1:0]     adc_data,
  input  vad_cfg_t             cfg,
  output logic                 adc_start,       // ADC conversion strobe
  output logic                 sample_tick,     // VAD takes adc_data now
  output logic                 speech,          // VAD result
  output pwr_en_t              pwr_en,          // domain supply enables
  output logic                 high_rate,       // ADC at 16 kHz
  output logic                 wake,
  output logic                 sleep,
  output logic                 decided,         // frame judged
  output logic [CNT_W-1:0]     frame_zc_count,  // crossings in last frame
  output logic [SAMPLE_W-1:0]  dc_offset,       // learnt DC offset
  output logic                 zc_pulse,        // crossing found
  output logic                 zc_fall          // ... coming from above
);

  sample_rate_gen u_rate (
    .clk, .rst_n, .high_rate, .vad_tick(sample_tick), .main_tick(), .adc_start
  );

  vad_core u_vad (
    .clk, .rst_n, .sample_en(sample_tick), .adc_data, .cfg,
    .speech, .decided, .frame_zc_count, .dc_offset, .zc_pulse, .zc_fall
  );

  power_manager u_pm (
    .clk, .rst_n, .speech, .pwr_en, .high_rate, .wake, .sleep
  );

endmodule
