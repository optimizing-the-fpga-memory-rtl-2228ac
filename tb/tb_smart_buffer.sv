// tb_smart_buffer: self-checking test of the 3x3 sliding-window buffer.
//
// Streams random pixels with random gaps (pix_valid low about 30 % of
// cycles) through a smart buffer of a small width and keeps every accepted
// pixel. After accepting pixel n the window must hold
//   win[r][c] = p(n - (2-r)*IMG_W - (2-c))
// for all nine positions once 2*IMG_W+2 pixels have gone in, and it must
// not change in a cycle without a pixel. Runs with IMG_W = 12 and with the
// full 320-pixel row.
module tb_smart_buffer;
  import sobel_pkg::*;

  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic    v_s, v_f;
  pixel_t  p_s, p_f;
  window_t w_s, w_f;

  smart_buffer #(.IMG_W(12))  dut_s (.clk(clk), .rst(rst), .pix_valid(v_s), .pix(p_s), .win(w_s));
  smart_buffer                dut_f (.clk(clk), .rst(rst), .pix_valid(v_f), .pix(p_f), .win(w_f));

  pixel_t hs [$];
  pixel_t hf [$];

  task automatic check_win(input window_t w, ref pixel_t h [$], input int W, input string tag);
    int n;
    n = h.size() - 1;
    if (n < 2 * W + 2) return;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (w[r][c] !== h[n - (2 - r) * W - (2 - c)]) begin
          failures++;
          if (failures < 10) $display("%s n=%0d win[%0d][%0d]=%0h exp=%0h", tag, n, r, c,
                                      w[r][c], h[n - (2 - r) * W - (2 - c)]);
        end
      end
  endtask

  task automatic check_hold(input window_t w, input window_t old);
    checks++;
    if (w != old) failures++;
  endtask

  initial begin
    window_t old_s, old_f;
    rst = 1'b1; v_s = 0; v_f = 0; p_s = '0; p_f = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      v_s = ($urandom_range(9) < 7);
      v_f = ($urandom_range(9) < 7);
      p_s = pixel_t'($urandom);
      p_f = pixel_t'($urandom);
      old_s = w_s;
      old_f = w_f;
      @(posedge clk);
      #1;
      if (v_s) begin hs.push_back(p_s); check_win(w_s, hs, 12, "small"); end
      else check_hold(w_s, old_s);
      if (v_f) begin hf.push_back(p_f); check_win(w_f, hf, DEF_IMG_W, "full"); end
      else check_hold(w_f, old_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
