// stereo_pkg: types and constants shared by the stereo vision pipeline.
//
// A pixel stream in this design moves one word per clock with no handshake.
// Each word carries a valid flag and a start-of-frame flag next to the data,
// so every stage can simply register the word and pass the flags along.
// The image size (800x480), the 3x3 window and the 40-pixel search range
// are the defaults of the modules' parameters; they are not fixed here.
package stereo_pkg;

  localparam int PIX_W = 8;                    // gray level / colour channel width

  typedef logic [PIX_W-1:0] pix8_t;

  typedef struct packed {
    logic [PIX_W-1:0] r;
    logic [PIX_W-1:0] g;
    logic [PIX_W-1:0] b;
  } rgb_t;

  // Side-band flags that travel with every pixel.
  typedef struct packed {
    logic valid;  // the word holds a pixel of a frame
    logic sof;    // first pixel of a frame (only meaningful with valid)
  } sb_t;

  localparam int SB_W = $bits(sb_t);

  // Morphology output choice of the pre-processing unit.
  typedef enum logic {
    MORPH_DILATE = 1'b0,
    MORPH_ERODE  = 1'b1
  } morph_sel_e;

endpackage
