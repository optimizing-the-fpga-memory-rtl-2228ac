// line_buffer: block-RAM delay line that holds the part of one image row
// that is not kept in window registers.
//
// Every cycle with `en` high the module writes `din` at the current pointer,
// reads the old word stored at the same pointer into the output register
// `dout`, and advances the pointer (wrapping at DEPTH). The array is read
// before it is written, so after the n-th enable `dout` holds the value that
// was written at enable n-DEPTH: a delay of exactly DEPTH enables, stalls
// excluded. With the registered output this is the classic single-port
// read-before-write block RAM.
//
// Timing: `dout` changes only on an enabled clock edge. Reset clears the
// pointer and `dout` but not the array; words read before DEPTH enables
// have passed are stale and must be ignored by the caller.
//
// The smart buffer needs a row delay of IMG_W pixels, of which four are
// provided by registers (three window registers and this module's output
// register), so DEPTH = IMG_W - 4 = 316 for a 320-pixel row. Two such
// buffers give 2 x 316 x 8 = 5,056 bits, the block-RAM total reported for
// the register/block-memory design. The pointer scheme is this design's own.
module line_buffer #(
  parameter int unsigned WIDTH = sobel_pkg::PIX_W,
  parameter int unsigned DEPTH = sobel_pkg::DEF_IMG_W - 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  // RAM port: read-before-write at the same address.
  always_ff @(posedge clk) begin
    if (en) begin
      mem[ptr] <= din;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
    end else if (en) begin
      dout <= mem[ptr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

endmodule
