// threshold: binarises a magnitude stream against a run-time level.
//
// Purely combinational (latency 0): out_pix is all ones (255 for 8 bits)
// where mag >= level and 0 elsewhere, so the gray-scale morphology that
// follows sees a binary image. Invalid words give 0. The level input and
// the 0/255 coding are this design's choices.
module threshold #(
  parameter int MW = 13,   // magnitude width
  parameter int DW = 8,    // output pixel width
  parameter int SW = 2
) (
  input  logic [MW-1:0]  mag,
  input  logic [MW-1:0]  level,
  input  logic           in_valid,
  input  logic [SW-1:0]  in_sb,
  output logic [DW-1:0]  out_pix,
  output logic [SW-1:0]  out_sb
);

  always_comb begin
    out_pix = (in_valid && (mag >= level)) ? '1 : '0;
    out_sb  = in_sb;
  end

endmodule
