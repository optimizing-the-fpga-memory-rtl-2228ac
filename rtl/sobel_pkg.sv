// sobel_pkg: types and default sizes shared by the Sobel edge detector.
//
// The detector processes 8-bit grey-scale images; the reference frame is
// 320 x 320 pixels. Those numbers are the defaults of every module's image
// parameters. The 3x3 window type is an array of rows (0 = oldest/top row)
// by columns (0 = oldest/left column).
package sobel_pkg;

  localparam int unsigned PIX_W     = 8;    // bits per pixel
  localparam int unsigned DEF_IMG_W = 320;  // default image width in pixels
  localparam int unsigned DEF_IMG_H = 320;  // default image height in pixels

  typedef logic [PIX_W-1:0] pixel_t;

  // 3x3 neighbourhood: win[row][col], row 0 is the top row, col 0 the left column.
  typedef pixel_t window_t [3][3];

endpackage
