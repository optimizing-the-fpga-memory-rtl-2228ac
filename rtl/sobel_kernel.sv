// sobel_kernel: Sobel gradient operator on one 3x3 window per cycle.
//
// Stage 1 computes the two signed gradients
//   Gx = (w02 + 2*w12 + w22) - (w00 + 2*w10 + w20)   (right column - left)
//   Gy = (w20 + 2*w21 + w22) - (w00 + 2*w01 + w02)   (bottom row - top row)
// with w<row><col>. Stage 2 forms |Gx| + |Gy| and saturates it to the pixel
// range (255 for 8-bit pixels). The centre pixel has weight zero.
//
// Interface: `in_valid`/`win`/`in_tag` enter together; `out_valid`,
// `out_mag` and `out_tag` leave exactly LATENCY = 2 cycles later. The tag
// (the output pixel's address) is carried along unchanged. The kernel has
// no stall: one window is accepted every cycle.
//
// The document names the Sobel edge detector and checks it against a C
// reference program but gives no formula; the standard Sobel masks with the
// |Gx|+|Gy| magnitude clamped to 255 are this design's reading of it, as is
// the two-stage pipeline.
module sobel_kernel
  import sobel_pkg::*;
#(
  parameter int unsigned TAG_W = 17
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  window_t          win,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output pixel_t           out_mag,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned G_W     = PIX_W + 3;  // signed, |G| <= 4*(2^PIX_W - 1)

  typedef logic signed [G_W-1:0] grad_t;

  function automatic grad_t ext(input pixel_t p);
    return grad_t'({3'b000, p});
  endfunction

  function automatic grad_t absval(input grad_t g);
    return g[G_W-1] ? -g : g;
  endfunction

  grad_t            gx_d, gy_d;
  grad_t            gx_q, gy_q;
  logic             v_q;
  logic [TAG_W-1:0] tag_q;
  logic [G_W:0]     sum_d;

  always_comb begin
    gx_d = (ext(win[0][2]) + (ext(win[1][2]) <<< 1) + ext(win[2][2]))
         - (ext(win[0][0]) + (ext(win[1][0]) <<< 1) + ext(win[2][0]));
    gy_d = (ext(win[2][0]) + (ext(win[2][1]) <<< 1) + ext(win[2][2]))
         - (ext(win[0][0]) + (ext(win[0][1]) <<< 1) + ext(win[0][2]));
  end

  // Stage 1: gradients.
  always_ff @(posedge clk) begin
    if (rst) begin
      v_q   <= 1'b0;
      gx_q  <= '0;
      gy_q  <= '0;
      tag_q <= '0;
    end else begin
      v_q   <= in_valid;
      gx_q  <= gx_d;
      gy_q  <= gy_d;
      tag_q <= in_tag;
    end
  end

  always_comb begin
    sum_d = {1'b0, absval(gx_q)} + {1'b0, absval(gy_q)};
  end

  // Stage 2: magnitude with saturation.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= v_q;
      out_mag   <= (sum_d > (G_W + 1)'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : sum_d[PIX_W-1:0];
      out_tag   <= tag_q;
    end
  end

endmodule
