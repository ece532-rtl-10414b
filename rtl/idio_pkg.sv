// idio_pkg: types and constants shared by the wand-tracking video pipeline.
//
// Holds the pixel formats (YCbCr and RGB, 8 bits per component), the wand
// configuration written by software (colour, normalisation threshold and the
// smallest cluster that counts), the result record (bounding box and centre,
// 16-bit coordinates) and the word index of each of the five control
// registers. The register layout and the 16-bit field widths follow the
// register description of the design; the register order (one word apart,
// STATUS_NORM first) is this design's own choice.
package idio_pkg;

  localparam int unsigned COORD_W = 16;  // every coordinate field is 16 bits
  localparam int unsigned NORM_W  = 16;  // Colour_Norm field width
  localparam int unsigned IGN_W   = 16;  // Ignore_Pixels field width

  typedef logic [COORD_W-1:0] coord_t;

  // Wand_Colour encoding of the WAND_IGNORE register
  typedef enum logic [1:0] {
    COL_RED   = 2'd0,
    COL_GREEN = 2'd1,
    COL_BLUE  = 2'd2
  } wand_colour_e;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [NORM_W-1:0] colour_norm;
    logic [1:0]        colour;       // wand_colour_e value, 3 is treated as red
    logic [IGN_W-1:0]  ignore_pixels;
  } wand_cfg_t;

  typedef struct packed {
    coord_t left;
    coord_t right;
    coord_t top;
    coord_t bottom;
    coord_t x;
    coord_t y;
  } wand_result_t;

  // Word index (byte offset / 4) of each control register
  localparam logic [2:0] REG_STATUS_NORM = 3'd0;
  localparam logic [2:0] REG_WAND_IGNORE = 3'd1;
  localparam logic [2:0] REG_LEFT_RIGHT  = 3'd2;
  localparam logic [2:0] REG_TOP_BOTTOM  = 3'd3;
  localparam logic [2:0] REG_CENTRE      = 3'd4;

  // STATUS_NORM bit positions
  localparam int unsigned GO_BIT   = 31;
  localparam int unsigned DONE_BIT = 30;

endpackage
