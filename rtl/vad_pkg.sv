// vad_pkg: constants and types shared by the zero-crossing voice activity
// detector (VAD) and its sensor-node power management.
//
// The numbers follow the design description: a 16-bit ADC bus of which the
// VAD keeps 10 bits, a 2 kHz VAD sampling rate, a 16 kHz / 16-bit rate for
// the main signal processor once speech is present, frames of 256 samples
// and a 100 kHz system clock (the rate of the standard-cell version).
// The trigger levels, the decision threshold and the reset value of the DC
// offset are not given by the description; the defaults below are this
// design's own choice and are held in the runtime configuration struct.
package vad_pkg;

  // Data widths
  localparam int unsigned ADC_W     = 16;   // ADC output bus
  localparam int unsigned SAMPLE_W  = 10;   // bits per sample used by the VAD

  // Timing
  localparam int unsigned CLK_HZ    = 100_000; // system clock
  localparam int unsigned VAD_FS    = 2_000;   // VAD sampling rate
  localparam int unsigned MAIN_FS   = 16_000;  // main-processor sampling rate

  // Framing
  localparam int unsigned FRAME_LEN = 256;     // samples per frame (power of two)

  // Own choices (not given by the description)
  localparam logic [SAMPLE_W-1:0] OFFSET_INIT     = SAMPLE_W'(1 << (SAMPLE_W-1)); // mid-scale
  localparam logic [SAMPLE_W-1:0] TRIG_HI_DEFAULT = SAMPLE_W'(16);
  localparam logic [SAMPLE_W-1:0] TRIG_LO_DEFAULT = SAMPLE_W'(16);
  localparam int unsigned         ZC_THR_DEFAULT  = 8;   // crossings per frame

  localparam int unsigned CNT_W = $clog2(FRAME_LEN + 1); // zero crossings per frame

  // Runtime configuration of the detector
  typedef struct packed {
    logic [SAMPLE_W-1:0] trig_hi;   // high trigger, above the offset
    logic [SAMPLE_W-1:0] trig_lo;   // low trigger, below the offset
    logic [CNT_W-1:0]    zc_thr;    // crossings per frame that mean speech
  } vad_cfg_t;

  // Power-domain enables driven by the power management block
  typedef struct packed {
    logic main_adc;   // 16-bit / 16 kHz ADC of the main signal path
    logic memory;     // shared memory
    logic sig_proc;   // signal-processing module
    logic main_app;   // main application module
  } pwr_en_t;

  // Arming state of the zero-crossing detector
  typedef enum logic [1:0] {
    ARM_NONE = 2'd0,  // no trigger line passed since the last crossing
    ARM_HIGH = 2'd1,  // signal went above offset + high trigger
    ARM_LOW  = 2'd2   // signal went below offset - low trigger
  } arm_e;

endpackage
