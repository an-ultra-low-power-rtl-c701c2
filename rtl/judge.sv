// judge: speech / non-speech decision of the VAD (step 8 of the VAD flow).
//
// Speech raises the signal above the trigger lines often, so a frame holds
// many zero crossings; background noise below the triggers gives few. At
// the end of each frame the judge compares the frame's crossing count with
// the threshold `zc_thr` and renews its output state: speech when the count
// is at or above the threshold, non-speech otherwise. The state holds for
// the whole next frame.
//
// Timing: `speech`, `last_count` and the one-cycle `decided` pulse change in
// the cycle after `frame_end`. Reset gives non-speech.
//
// The frame-wise renewal from the crossing count follows the design
// description; the single threshold compare with ">=" and the reset state
// are this design's choices.
module judge #(
  parameter int unsigned CW = vad_pkg::CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_end,    // last sample of a frame
  input  logic [CW-1:0] frame_count,  // crossings in that frame
  input  logic [CW-1:0] zc_thr,       // decision threshold
  output logic          speech,       // output state
  output logic [CW-1:0] last_count,   // count of the last judged frame
  output logic          decided       // output state renewed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      speech     <= 1'b0;
      last_count <= '0;
      decided    <= 1'b0;
    end else begin
      decided <= frame_end;
      if (frame_end) begin
        speech     <= (frame_count >= zc_thr);
        last_count <= frame_count;
      end
    end
  end

endmodule
