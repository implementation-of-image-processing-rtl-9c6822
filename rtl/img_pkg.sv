// Shared types and constants of the gray-scale image processing functional
// unit. Pixels are 8-bit gray levels (0 = black, 255 = white); the pixel width
// is this design's choice. fu_result_t bundles the four results that the
// spatially parallel unit produces for one input pixel in the same cycle.
// disp_sel_e is the encoding of the output multiplexer's select input.
package img_pkg;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;
  typedef logic [PIX_W-1:0] pix_t;

  // Run-time tuning values of the four point operations.
  typedef struct packed {
    pix_t        cs_low;      // contrast stretching: input level mapped to 0
    logic [15:0] cs_gain;     // contrast stretching: slope, unsigned 8.8 fixed point
    logic [8:0]  br_offset;   // brightness: signed offset, -256..255
    pix_t        th_level;    // threshold: levels >= th_level become white
  } tune_t;

  // One result per algorithm, all for the same input pixel.
  typedef struct packed {
    pix_t contrast;
    pix_t bright;
    pix_t thresh;
    pix_t negative;
  } fu_result_t;

  typedef enum logic [1:0] {
    SEL_CONTRAST = 2'd0,
    SEL_BRIGHT   = 2'd1,
    SEL_THRESH   = 2'd2,
    SEL_NEGATIVE = 2'd3
  } disp_sel_e;
endpackage
