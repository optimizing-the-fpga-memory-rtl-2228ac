// smart_buffer: the register/block-RAM "smart buffer" that turns a raster
// stream of pixels into a sliding 3x3 window.
//
// Nine window registers form three shift rows of three pixels. A new pixel
// enters the right end of the bottom row; the pixel leaving the left end of
// the bottom row enters a line buffer (block RAM) whose output feeds the
// right end of the middle row, and likewise from the middle row to the top
// row through a second line buffer. Each row path (three registers, the
// line buffer and its output register) delays a pixel by exactly IMG_W
// enables, so the three rows always hold vertically adjacent pixels and
// every pixel is read from external memory only once.
//
// Interface: `pix_valid`/`pix` deliver one pixel; everything shifts only in
// a cycle with `pix_valid` high, so gaps in the input stream stall the
// window. `win` is the register contents: win[0][*] is the top (oldest) row,
// win[*][0] the left (oldest) column. After the clock edge that accepts
// pixel n (counted in raster order), win[2][2] = p(n), win[1][2] = p(n-W),
// win[0][2] = p(n-2W), so the window is centred on pixel n-W-1. Which
// windows are complete (not straddling a row end or the first two rows) is
// decided by sobel_ctrl.
//
// The arrangement of nine shift registers and two memory blocks follows the
// document; the line-buffer depth of IMG_W-4 is derived from its block-RAM
// total (5,056 bits for a 320-pixel row). Pixel-valid stalling is this
// design's own choice.
module smart_buffer
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = DEF_IMG_W
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    pix_valid,
  input  pixel_t  pix,
  output window_t win
);

  pixel_t lb_out [2];  // lb_out[0] feeds the top row, lb_out[1] the middle row

  // Middle -> top row line buffer.
  line_buffer #(.WIDTH(PIX_W), .DEPTH(IMG_W - 4)) u_lb_top (
    .clk (clk),
    .rst (rst),
    .en  (pix_valid),
    .din (win[1][0]),
    .dout(lb_out[0])
  );

  // Bottom -> middle row line buffer.
  line_buffer #(.WIDTH(PIX_W), .DEPTH(IMG_W - 4)) u_lb_mid (
    .clk (clk),
    .rst (rst),
    .en  (pix_valid),
    .din (win[2][0]),
    .dout(lb_out[1])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < 3; r++) begin
        for (int c = 0; c < 3; c++) begin
          win[r][c] <= '0;
        end
      end
    end else if (pix_valid) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb_out[0];
      win[1][2] <= lb_out[1];
      win[2][2] <= pix;
    end
  end

endmodule
