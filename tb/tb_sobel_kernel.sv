// tb_sobel_kernel: self-checking test of the Sobel operator.
//
// Feeds a random window every cycle (random valid, random tag), plus
// directed windows: flat (result 0), a vertical and a horizontal step
// (pure Gx / Gy), and the maximum-contrast window that saturates. The
// expected magnitude min(|Gx|+|Gy|, 255) is computed here with integer
// arithmetic from the Sobel masks, and every output is checked on the second
// clock edge after its input is presented, including valid and tag.
module tb_sobel_kernel;
  import sobel_pkg::*;

  localparam int unsigned TAG_W = 17;
  localparam int LAT = 2;

  logic             clk = 1'b0;
  logic             rst;
  logic             in_valid, out_valid;
  window_t          win;
  logic [TAG_W-1:0] in_tag, out_tag;
  pixel_t           out_mag;

  int checks = 0, failures = 0, saturated = 0;

  sobel_kernel #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mag(input window_t w);
    int gx, gy, m;
    gx = (int'(w[0][2]) + 2 * int'(w[1][2]) + int'(w[2][2]))
       - (int'(w[0][0]) + 2 * int'(w[1][0]) + int'(w[2][0]));
    gy = (int'(w[2][0]) + 2 * int'(w[2][1]) + int'(w[2][2]))
       - (int'(w[0][0]) + 2 * int'(w[0][1]) + int'(w[0][2]));
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (m > 255) ? 255 : m;
  endfunction

  typedef struct {
    logic             v;
    int               mag;
    logic [TAG_W-1:0] tag;
  } exp_t;

  exp_t pipe [$];

  task automatic apply(input logic v, input window_t w, input logic [TAG_W-1:0] t);
    exp_t e;
    @(negedge clk);
    in_valid = v; win = w; in_tag = t;
    e.v = v; e.mag = ref_mag(w); e.tag = t;
    pipe.push_back(e);
    @(posedge clk);
    #1;
    if (pipe.size() >= LAT) begin
      e = pipe.pop_front();
      checks++;
      if (out_valid !== e.v) failures++;
      if (e.v) begin
        checks++;
        if (out_mag !== pixel_t'(e.mag) || out_tag !== e.tag) begin
          failures++;
          if (failures < 10) $display("mag=%0d exp=%0d tag=%0h exp=%0h", out_mag, e.mag, out_tag, e.tag);
        end
        if (e.mag == 255) saturated++;
      end
    end
  endtask

  function automatic window_t mkwin(input int a00, a01, a02, a10, a11, a12, a20, a21, a22);
    window_t w;
    w[0][0] = pixel_t'(a00); w[0][1] = pixel_t'(a01); w[0][2] = pixel_t'(a02);
    w[1][0] = pixel_t'(a10); w[1][1] = pixel_t'(a11); w[1][2] = pixel_t'(a12);
    w[2][0] = pixel_t'(a20); w[2][1] = pixel_t'(a21); w[2][2] = pixel_t'(a22);
    return w;
  endfunction

  initial begin
    window_t w;
    rst = 1'b1; in_valid = 0; in_tag = '0;
    win = mkwin(0, 0, 0, 0, 0, 0, 0, 0, 0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // directed windows
    apply(1, mkwin(7, 7, 7, 7, 7, 7, 7, 7, 7), 17'd1);
    apply(1, mkwin(0, 0, 10, 0, 0, 10, 0, 0, 10), 17'd2);     // Gx = 40
    apply(1, mkwin(10, 10, 10, 0, 0, 0, 0, 0, 0), 17'd3);     // Gy = -40
    apply(1, mkwin(0, 0, 255, 0, 0, 255, 255, 255, 255), 17'd4); // saturates
    apply(1, mkwin(255, 255, 255, 255, 0, 0, 255, 0, 0), 17'd5);
    apply(0, mkwin(1, 2, 3, 4, 5, 6, 7, 8, 9), 17'd6);
    for (int i = 0; i < 20000; i++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          w[r][c] = ($urandom_range(3) == 0) ? pixel_t'($urandom_range(1) * 255) : pixel_t'($urandom);
      apply(($urandom_range(3) != 0), w, TAG_W'($urandom));
    end
    repeat (LAT) apply(0, w, '0);
    checks++;
    if (saturated == 0) failures++;
    $display("saturated results: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
