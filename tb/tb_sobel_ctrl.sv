// tb_sobel_ctrl: self-checking test of the frame controller.
//
// Uses a 7 x 5 image. Pixels arrive with random gaps; for each accepted
// pixel (row, col), counted here independently, `win_valid` must be high
// on the next cycle exactly when row >= 2 and col >= 2, with
// `win_addr` = (row-1)*W + (col-1). Result pulses are fed back on
// `out_valid`; `done` must pulse with the (W-2)*(H-2)-th one and `busy`
// must span start to done. Two frames are run back to back.
module tb_sobel_ctrl;
  localparam int W = 7, H = 5, AW = 6;

  logic          clk = 1'b0;
  logic          rst, start, pix_valid, win_valid, out_valid, busy, done;
  logic [AW-1:0] win_addr;

  int checks = 0, failures = 0;

  sobel_ctrl #(.IMG_W(W), .IMG_H(H), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame();
    int n, outs, dones;
    logic exp_v;
    int   exp_a;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks++;
    if (!busy) failures++;
    n = 0; outs = 0; dones = 0;
    while (n < W * H) begin
      pix_valid = ($urandom_range(3) != 0);
      out_valid = 1'b0;
      exp_v = pix_valid && (n / W >= 2) && (n % W >= 2);
      exp_a = (n / W - 1) * W + (n % W - 1);
      @(posedge clk);
      #1;
      checks++;
      if (win_valid !== exp_v) failures++;
      if (exp_v) begin
        checks++;
        if (win_addr !== AW'(exp_a)) failures++;
      end
      if (pix_valid) n++;
      @(negedge clk);
    end
    pix_valid = 1'b0;
    // results return from the kernel later, with gaps
    while (outs < (W - 2) * (H - 2)) begin
      out_valid = ($urandom_range(1) == 1);
      @(posedge clk);
      #1;
      if (out_valid) outs++;
      checks++;
      if (done !== (out_valid && outs == (W - 2) * (H - 2))) failures++;
      if (done) dones++;
      checks++;
      if (busy !== !(out_valid && outs == (W - 2) * (H - 2))) failures++;
      @(negedge clk);
    end
    out_valid = 1'b0;
    @(posedge clk); #1;
    checks += 2;
    if (dones != 1) failures++;
    if (done || busy) failures++;
  endtask

  initial begin
    rst = 1'b1; start = 0; pix_valid = 0; out_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    frame();
    frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
