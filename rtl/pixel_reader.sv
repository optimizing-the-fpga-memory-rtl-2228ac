// pixel_reader: read-address generator for the external image memory.
//
// On `start` it walks the input image in raster order and issues one read
// request per pixel, IMG_W*IMG_H requests in all, so every pixel crosses the
// external-memory interface exactly once (102,400 reads for a 320 x 320
// frame). A request is `rd_en` with `rd_addr`; it is taken in a cycle where
// `rd_ready` is also high, and the address advances only then, so the
// memory may stall the reader. Read data returns separately, in order, on
// the memory's own valid/data signals.
//
// Timing: `rd_en` rises the cycle after `start` and stays high until the
// last request is accepted; `busy` covers the same span. `start` while busy
// is ignored. The one-access-per-pixel rule is the document's; the
// request/ready handshake is this design's own choice.
module pixel_reader #(
  parameter int unsigned IMG_W  = sobel_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H  = sobel_pkg::DEF_IMG_H,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ready,
  output logic              busy
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(IMG_W * IMG_H - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_en   <= 1'b0;
      rd_addr <= '0;
    end else if (!rd_en) begin
      if (start) begin
        rd_en   <= 1'b1;
        rd_addr <= '0;
      end
    end else if (rd_ready) begin
      if (rd_addr == LAST) begin
        rd_en <= 1'b0;
      end else begin
        rd_addr <= rd_addr + 1'b1;
      end
    end
  end

  assign busy = rd_en;

  // The address must hold while a request waits for the memory.
  property p_hold_while_stalled;
    @(posedge clk) disable iff (rst) (rd_en && !rd_ready) |=> (rd_en && $stable(rd_addr));
  endproperty
  a_hold_while_stalled : assert property (p_hold_while_stalled);

endmodule
