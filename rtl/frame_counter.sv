// frame_counter: counts input samples to mark the end of each frame (step 5
// of the VAD flow).
//
// A modulo-FRAME_LEN counter advances on every `valid`. `frame_end` is
// combinational and high in the cycle of the last sample of a frame, so the
// accumulators can close the frame on that same sample. `index` is the
// position of the current sample in its frame.
//
// The frame length of 256 samples follows the design description; the
// counter itself is this design's simplest form of step 5.
module frame_counter #(
  parameter int unsigned FRAME_LEN = vad_pkg::FRAME_LEN
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         valid,
  output logic [$clog2(FRAME_LEN)-1:0] index,
  output logic                         frame_end
);

  localparam int unsigned IW = $clog2(FRAME_LEN);

  initial assert (FRAME_LEN >= 2 && (FRAME_LEN & (FRAME_LEN - 1)) == 0)
    else $fatal(1, "FRAME_LEN must be a power of two");

  assign frame_end = valid && (index == IW'(FRAME_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     index <= '0;
    else if (valid) index <= index + 1'b1;   // wraps at FRAME_LEN
  end

endmodule
