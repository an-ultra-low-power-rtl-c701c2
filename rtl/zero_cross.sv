// zero_cross: zero-crossing detector with trigger lines (steps 1 and 2 of
// the VAD flow).
//
// A zero crossing is the first time the signal meets the offset line after
// its amplitude has passed one of the two trigger lines: the high trigger
// (offset + trig_hi) or the low trigger (offset - trig_lo). Small wiggles
// around the offset, as from background noise, therefore do not count.
//
// Step 1 subtracts the current DC offset from the sample in a signed word
// one bit wider than the sample, so the difference cannot overflow. Step 2
// is a three-state arming machine: NONE until a trigger line is passed,
// HIGH after the signal rose above the high trigger, LOW after it fell below
// the low trigger. From HIGH a sample at or below the offset is a crossing;
// from LOW a sample at or above it is one. After a crossing the machine
// re-arms at once if the same sample is already beyond the opposite trigger,
// otherwise it returns to NONE.
//
// Timing: `zc` is combinational and valid in the cycle where `valid` is
// high; the arming state advances at the end of that cycle. The arming
// state is kept across frame boundaries.
//
// The crossing definition is the one in the design description; the arming
// machine, the comparisons (strictly beyond a trigger, at-or-past the
// offset) and the widths are this design's reading of it.
module zero_cross
  import vad_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,      // new sample this cycle
  input  logic [W-1:0]        sample,     // unsigned sample
  input  logic [W-1:0]        offset,     // current DC offset estimate
  input  logic [W-1:0]        trig_hi,    // high trigger distance
  input  logic [W-1:0]        trig_lo,    // low trigger distance
  output logic                zc,         // zero crossing on this sample
  output logic                zc_fall,    // crossing came from above
  output logic signed [W:0]   diff        // sample - offset
);

  arm_e arm_q, arm_d;
  logic above_hi, below_lo;

  // Step 1: offset removal in a wider signed word
  assign diff     = $signed({1'b0, sample}) - $signed({1'b0, offset});
  assign above_hi = diff >  $signed({1'b0, trig_hi});
  assign below_lo = diff < -$signed({1'b0, trig_lo});

  // Step 2: crossing detection
  always_comb begin
    arm_d   = arm_q;
    zc      = 1'b0;
    zc_fall = 1'b0;
    if (valid) begin
      unique case (arm_q)
        ARM_HIGH: begin
          if (diff <= 0) begin
            zc      = 1'b1;
            zc_fall = 1'b1;
            arm_d   = below_lo ? ARM_LOW : ARM_NONE;
          end
        end
        ARM_LOW: begin
          if (diff >= 0) begin
            zc    = 1'b1;
            arm_d = above_hi ? ARM_HIGH : ARM_NONE;
          end
        end
        default: begin
          if (above_hi)      arm_d = ARM_HIGH;
          else if (below_lo) arm_d = ARM_LOW;
          else               arm_d = ARM_NONE;
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) arm_q <= ARM_NONE;
    else        arm_q <= arm_d;
  end

endmodule
