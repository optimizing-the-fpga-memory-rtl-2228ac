// sobel_top: Sobel edge detector built around a register/block-RAM smart
// buffer, reading its input from and writing its result to external memory.
//
// Data flow: pixel_reader requests the input image from external memory
// once per pixel in raster order. Returned pixels (mem_rd_valid/mem_rd_data)
// shift into smart_buffer, nine window registers joined by two line-buffer
// block RAMs, which presents a 3x3 window every accepted pixel. sobel_ctrl
// marks the complete windows and gives each its output address; sobel_kernel
// computes the saturated |Gx|+|Gy| and the result is written back to the
// output image in external memory (out_wr_*). Once the pipeline is full the
// design produces one result per input pixel with no re-reads; a frame
// costs IMG_W*IMG_H reads and (IMG_W-2)*(IMG_H-2) writes.
//
// Interfaces:
//   read request   mem_rd_en/mem_rd_addr, taken when mem_rd_ready is high
//   read data      mem_rd_valid/mem_rd_data, in request order, any latency
//   write          out_wr_en/out_wr_addr/out_wr_data, one cycle, no stall;
//                  the address is the centre pixel's raster index in an
//                  image of the same size; border pixels are not written
//   control        start (pulse) -> busy ... done (one-cycle pulse)
// Timing: with a memory that is always ready and returns data L cycles
// after the request, `done` comes IMG_W*IMG_H + L + 3 cycles after `start`.
//
// The memory organisation (registers plus two block memories, one external
// access per pixel) is the document's; the handshakes, the border policy
// and the kernel arithmetic are this design's own choices.
module sobel_top
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W  = DEF_IMG_W,
  parameter int unsigned IMG_H  = DEF_IMG_H,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // external memory: input image reads
  output logic              mem_rd_en,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_ready,
  input  logic              mem_rd_valid,
  input  pixel_t            mem_rd_data,
  // external memory: output image writes
  output logic              out_wr_en,
  output logic [ADDR_W-1:0] out_wr_addr,
  output pixel_t            out_wr_data
);

  window_t           win;
  logic              win_valid;
  logic [ADDR_W-1:0] win_addr;
  logic              reader_busy;

  pixel_reader #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) u_reader (
    .clk     (clk),
    .rst     (rst),
    .start   (start && !busy),
    .rd_en   (mem_rd_en),
    .rd_addr (mem_rd_addr),
    .rd_ready(mem_rd_ready),
    .busy    (reader_busy)
  );

  smart_buffer #(.IMG_W(IMG_W)) u_buf (
    .clk      (clk),
    .rst      (rst),
    .pix_valid(mem_rd_valid),
    .pix      (mem_rd_data),
    .win      (win)
  );

  sobel_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .pix_valid(mem_rd_valid),
    .win_valid(win_valid),
    .win_addr (win_addr),
    .out_valid(out_wr_en),
    .busy     (busy),
    .done     (done)
  );

  sobel_kernel #(.TAG_W(ADDR_W)) u_kernel (
    .clk      (clk),
    .rst      (rst),
    .in_valid (win_valid),
    .win      (win),
    .in_tag   (win_addr),
    .out_valid(out_wr_en),
    .out_mag  (out_wr_data),
    .out_tag  (out_wr_addr)
  );

  // The reader never runs outside a frame.
  a_reader_in_frame : assert property (@(posedge clk) disable iff (rst) reader_busy |-> busy);

endmodule
