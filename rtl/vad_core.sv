// vad_core: zero-crossing voice activity detector.
//
// The detector decides, frame by frame, whether an input signal holds
// speech, with nothing but adders, comparators, a shifter and registers.
// Per sample it:
//   1. removes the learnt DC offset from the sample            (zero_cross)
//   2. detects a crossing of the offset line after a trigger    (zero_cross)
//   3. counts the crossings of the frame                        (zc_counter)
//   4. adds the sample to the frame sum                  (offset_controller)
//   5. counts samples to find the end of the frame          (frame_counter)
// and on the last sample of each frame it
//   6-7. renews the DC offset from the frame mean        (offset_controller)
//   8.   renews the speech state from the crossing count            (judge)
//
// The ADC word is captured into a 10-bit sample on every `sample_en`
// strobe (input_reg); the whole per-sample step then takes the single
// clock cycle after the strobe. `speech`, `frame_zc_count` and `decided`
// change one cycle after the frame's last sample, `dc_offset` at the same
// time.
//
// The eight-step flow, the block split and the sizes (10 bits, 256-sample
// frames) follow the design description; the runtime configuration struct
// and the observation outputs are this design's choices.
module vad_core
  import vad_pkg::ADC_W, vad_pkg::SAMPLE_W, vad_pkg::CNT_W, vad_pkg::vad_cfg_t;
#(
  parameter int unsigned IN_W      = ADC_W,
  parameter int unsigned W         = SAMPLE_W,
  parameter int unsigned FRAME_LEN = vad_pkg::FRAME_LEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,       // VAD sample strobe
  input  logic [IN_W-1:0]      adc_data,        // ADC word
  input  vad_cfg_t             cfg,             // triggers and threshold
  output logic                 speech,          // output state
  output logic                 decided,         // state renewed
  output logic [CNT_W-1:0]     frame_zc_count,  // crossings in last frame
  output logic [W-1:0]         dc_offset,       // current offset
  output logic                 zc_pulse,        // a crossing was found
  output logic                 zc_fall          // ... coming from above
);

  localparam int unsigned CW = $clog2(FRAME_LEN + 1);

  initial assert (CW <= CNT_W) else $fatal(1, "FRAME_LEN too large for CNT_W");

  logic [W-1:0]      sample;
  logic              valid;
  logic              frame_end;
  logic [CW-1:0]     frame_count;
  logic [CW-1:0]     last_count;
  logic              offset_updated;

  input_reg #(.IN_W(IN_W), .OUT_W(W)) u_in (
    .clk, .rst_n, .en(sample_en), .adc_data, .sample, .valid
  );

  zero_cross #(.W(W)) u_zc (
    .clk, .rst_n, .valid, .sample, .offset(dc_offset),
    .trig_hi(cfg.trig_hi[W-1:0]), .trig_lo(cfg.trig_lo[W-1:0]),
    .zc(zc_pulse), .zc_fall, .diff()
  );

  frame_counter #(.FRAME_LEN(FRAME_LEN)) u_frame (
    .clk, .rst_n, .valid, .index(), .frame_end
  );

  zc_counter #(.FRAME_LEN(FRAME_LEN), .CW(CW)) u_cnt (
    .clk, .rst_n, .valid, .zc(zc_pulse), .frame_end, .count(), .frame_count
  );

  offset_controller #(.W(W), .FRAME_LEN(FRAME_LEN)) u_off (
    .clk, .rst_n, .valid, .sample, .frame_end,
    .offset(dc_offset), .updated(offset_updated)
  );

  judge #(.CW(CW)) u_judge (
    .clk, .rst_n, .frame_end, .frame_count, .zc_thr(cfg.zc_thr[CW-1:0]),
    .speech, .last_count, .decided
  );

  assign frame_zc_count = CNT_W'(last_count);

  // The offset and the decision are renewed on the same frame boundary
  a_same_boundary: assert property (@(posedge clk) disable iff (!rst_n)
                                    decided == offset_updated);

endmodule
