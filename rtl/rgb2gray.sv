// rgb2gray: converts an RGB pixel stream to 8-bit gray levels.
//
// Y = (77*R + 150*G + 29*B) >> 8, the ITU-R BT.601 luma weights in 8-bit
// fixed point (the weights sum to 256, so white stays 255). Stage 1
// registers the three products, stage 2 registers their sum, giving the
// 2-cycle latency budgeted for this block. The weights are this design's
// choice; one pixel is accepted every clock and the side-band flags follow
// the pixel unchanged.
module rgb2gray
  import stereo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  rgb_t  in_rgb,
  input  sb_t   in_sb,
  output pix8_t out_gray,
  output sb_t   out_sb
);

  localparam logic [7:0] KR = 8'd77;
  localparam logic [7:0] KG = 8'd150;
  localparam logic [7:0] KB = 8'd29;

  logic [15:0] pr, pg, pb;
  sb_t         s1_sb;
  logic [17:0] sum;

  assign sum = {2'b00, pr} + {2'b00, pg} + {2'b00, pb};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr <= '0; pg <= '0; pb <= '0; s1_sb <= '0;
      out_gray <= '0; out_sb <= '0;
    end else begin
      pr    <= in_rgb.r * KR;
      pg    <= in_rgb.g * KG;
      pb    <= in_rgb.b * KB;
      s1_sb <= in_sb;
      out_gray <= sum[15:8];
      out_sb   <= s1_sb;
    end
  end

endmodule
