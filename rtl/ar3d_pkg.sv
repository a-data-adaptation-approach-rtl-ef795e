// ar3d_pkg: types and constants shared by the Hline (triangle fill) accelerator
// and the zoned geometry/raster architecture.
//
// Word formats on the FSL links (32-bit data plus one control bit):
//   vertex word  : {x[11:0], y[11:0], c[7:0]}   screen vertex, colour 0..255
//   pixel word   : {y[11:0], x[11:0], c[7:0]}   one filled pixel
// The colour range 0..255 follows the document; the 12-bit screen coordinates
// and the packing are choices of this design.
// Interpolation uses signed Q16.16 fixed point (FRAC bits of fraction).
package ar3d_pkg;

  localparam int unsigned COORD_W = 12;   // screen x / y width
  localparam int unsigned COLOR_W = 8;    // pixel colour, 0..255
  localparam int unsigned FRAC    = 16;   // fraction bits of the interpolators
  localparam int unsigned WORD_W  = 32;   // FSL data width

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [COLOR_W-1:0] color_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    color_t c;
  } vertex_t;

  // One horizontal segment of a triangle, written by SED, read by SPF.
  typedef struct packed {
    logic   last;   // last segment of the triangle
    coord_t y;
    coord_t xl;     // left extremity
    coord_t xr;     // right extremity (xr >= xl)
    color_t cl;     // colour at xl
    color_t cr;     // colour at xr
  } line_t;

  // One filled pixel, written by SPF, read by the FSL sender.
  typedef struct packed {
    logic   last;   // last pixel of the triangle
    coord_t y;
    coord_t x;
    color_t c;
  } pixel_t;

  localparam int unsigned LINE_W  = $bits(line_t);
  localparam int unsigned PIXEL_W = $bits(pixel_t);

  // Geometry zone command words (sent with the FSL control bit set).
  typedef enum logic [1:0] {
    CMD_LOAD_MATRIX = 2'd0,   // followed by 16 Q16.16 matrix words, row major
    CMD_TRANSFORM   = 2'd1,   // followed by x, y, z (Q16.16); answers x', y', z', w'
    CMD_NORMAL      = 2'd2    // followed by 3 vertices of x, y, z (signed 16-bit); answers nx, ny, nz (Q2.14)
  } geo_cmd_e;

  // Configuration of the reconfigurable zone Z2.
  typedef enum logic {
    Z2_GEOMETRY = 1'b0,
    Z2_RASTER   = 1'b1
  } z2_cfg_e;

  // Round a Q16.16 value to the nearest integer (halves up).
  function automatic logic signed [31:0] q16_round(input logic signed [31:0] v);
    return (v + 32'sd32768) >>> FRAC;
  endfunction

endpackage
