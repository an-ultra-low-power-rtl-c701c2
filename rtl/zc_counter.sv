// zc_counter: zero-crossing counter of the current frame (step 3 of the VAD
// flow; the adder and reset register after the detector).
//
// An adder and a register accumulate `zc` pulses. In the cycle of the last
// sample of a frame (`frame_end`) the output `frame_count` carries the
// frame's total, the current sample's crossing included, and the register
// is cleared for the next frame (step 8 "zero cross = 0"). The count
// saturates at its maximum; with one crossing per sample at most, a frame
// of FRAME_LEN samples can never reach it.
//
// The adder-and-register structure with a frame reset follows the design
// description; the widths and the saturation are this design's choice.
module zc_counter #(
  parameter int unsigned FRAME_LEN = vad_pkg::FRAME_LEN,
  parameter int unsigned CW        = $clog2(FRAME_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic          zc,          // crossing on this sample
  input  logic          frame_end,   // last sample of the frame
  output logic [CW-1:0] count,       // crossings so far, current sample excluded
  output logic [CW-1:0] frame_count  // running total including this sample
);

  logic inc;
  assign inc         = valid && zc && (count != {CW{1'b1}});
  assign frame_count = count + CW'(inc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  count <= '0;
    else if (valid && frame_end) count <= '0;
    else                         count <= frame_count;
  end

endmodule
