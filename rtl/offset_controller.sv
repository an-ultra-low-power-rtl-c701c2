// offset_controller: DC offset tracking for the zero-crossing detector
// (steps 4, 6 and 7 of the VAD flow).
//
// The DC level of an ADC drifts with temperature, supply and noise, so the
// line that the detector counts crossings of is learnt from the signal
// itself, with integer arithmetic only. An adder and a register form the
// running sum of the frame's samples (step 4). On the frame's last sample
// the sum, this sample included, is divided by the frame length with a
// right shift by log2(FRAME_LEN) (step 6), the quotient becomes the new
// offset and the sum is cleared (step 7, "renew DC offset; SUM = 0").
//
// Timing: `offset` is registered; a new value appears in the cycle after
// `frame_end` and is used from the first sample of the next frame on.
// `updated` pulses in that same cycle. The offset starts at OFFSET_INIT.
//
// The sum-and-shift average and the frame-wise renewal follow the design
// description. Taking the frame mean itself as the new offset (rather than
// a smoothed value) and the reset value are this design's choices.
module offset_controller #(
  parameter int unsigned         W           = vad_pkg::SAMPLE_W,
  parameter int unsigned         FRAME_LEN   = vad_pkg::FRAME_LEN,
  parameter logic [W-1:0]        OFFSET_INIT = vad_pkg::OFFSET_INIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] sample,
  input  logic         frame_end,
  output logic [W-1:0] offset,
  output logic         updated
);

  localparam int unsigned SHIFT = $clog2(FRAME_LEN);
  localparam int unsigned SUM_W = W + SHIFT;

  logic [SUM_W-1:0] sum_q, sum_d;
  logic [SUM_W-1:0] mean;

  initial assert ((FRAME_LEN & (FRAME_LEN - 1)) == 0)
    else $fatal(1, "FRAME_LEN must be a power of two");

  assign sum_d = sum_q + SUM_W'(sample);
  assign mean  = sum_d >> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q   <= '0;
      offset  <= OFFSET_INIT;
      updated <= 1'b0;
    end else begin
      updated <= valid && frame_end;
      if (valid) begin
        if (frame_end) begin
          offset <= mean[W-1:0];
          sum_q  <= '0;
        end else begin
          sum_q  <= sum_d;
        end
      end
    end
  end

endmodule
