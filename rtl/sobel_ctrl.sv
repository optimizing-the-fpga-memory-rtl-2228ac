// sobel_ctrl: frame controller of the Sobel edge detector.
//
// It follows the pixels entering the smart buffer in raster order with a
// column and a row counter and a linear pixel index. The window that
// results from accepting pixel (row, col) is complete only when row >= 2
// and col >= 2; then it is centred on pixel (row-1, col-1), whose linear
// address (index - IMG_W - 1) becomes the output address. Windows that
// straddle a row end or lie in the first two rows are marked invalid, so
// the (IMG_W-2) x (IMG_H-2) interior pixels are produced and the one-pixel
// border is not written.
//
// Interface: `win_valid`/`win_addr` are registered on the same edge as the
// smart buffer's window, so they line up with it. `out_valid` counts the
// results leaving the kernel; `done` pulses for one cycle with the last
// one. `busy` is high from `start` to `done`; `start` clears the counters.
// The border handling and the counters are this design's own choices.
module sobel_ctrl #(
  parameter int unsigned IMG_W  = sobel_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H  = sobel_pkg::DEF_IMG_H,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              pix_valid,
  output logic              win_valid,
  output logic [ADDR_W-1:0] win_addr,
  input  logic              out_valid,
  output logic              busy,
  output logic              done
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned NOUT = (IMG_W - 2) * (IMG_H - 2);
  localparam int unsigned OW = $clog2(NOUT + 1);

  logic [CW-1:0]     col;
  logic [RW-1:0]     row;
  logic [ADDR_W-1:0] idx;
  logic [OW-1:0]     out_cnt;

  always_ff @(posedge clk) begin
    if (rst || (start && !busy)) begin
      col       <= '0;
      row       <= '0;
      idx       <= '0;
      win_valid <= 1'b0;
      win_addr  <= '0;
    end else begin
      win_valid <= pix_valid && (row >= RW'(2)) && (col >= CW'(2));
      if (pix_valid) begin
        win_addr <= idx - ADDR_W'(IMG_W + 1);
        idx      <= idx + 1'b1;
        if (col == CW'(IMG_W - 1)) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      out_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        out_cnt <= '0;
      end else if (out_valid) begin
        if (out_cnt == OW'(NOUT - 1)) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          out_cnt <= '0;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end

endmodule
