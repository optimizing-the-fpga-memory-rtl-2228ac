// tb_sobel_top: end-to-end test of the Sobel edge detector at its default
// size (320 x 320 pixels, 8 bits), against a behavioural external memory.
//
// Frame 1: a generated test image with sharp edges, memory always ready
// with a read latency of 2. Checks that every pixel is read exactly once
// (102,400 reads), that the frame takes exactly 102,400 + 2 + 3 cycles from
// start to done, that all 318 x 318 interior pixels are written once and
// no border pixel is, and that each written value equals the Sobel result
// computed here from the input image.
// Frame 2: a random image with the memory stalling about one cycle in
// three, so pixels reach the smart buffer with gaps; same data checks.
// Mechanisms counted (each must occur): memory stalls, gaps in the pixel
// stream, windows skipped at row ends and in the first rows, saturated
// results, zero results, line-buffer wrap-around (every IMG_W-4 pixels
// after the first row), back-to-back frames.
module tb_sobel_top;
  import sobel_pkg::*;

  localparam int W = DEF_IMG_W, H = DEF_IMG_H, N = W * H, AW = $clog2(N), LAT = 2;

  logic          clk = 1'b0;
  logic          rst, start, busy, done, stall_en;
  logic          mem_rd_en, mem_rd_ready, mem_rd_valid, out_wr_en;
  logic [AW-1:0] mem_rd_addr, out_wr_addr;
  pixel_t        mem_rd_data, out_wr_data;

  int checks = 0, failures = 0;
  int pix_seen = 0;  // pixels delivered to the design in the current frame
  int n_stall = 0, n_gap = 0, n_skip = 0, n_sat = 0, n_zero = 0, n_wrap = 0, n_frames = 0;

  sobel_top dut (.*);

  ext_mem_model #(.NWORDS(N), .AW(AW), .LAT(LAT)) u_mem (
    .clk(clk), .rst(rst), .stall_en(stall_en),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_ready(mem_rd_ready),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data),
    .wr_en(out_wr_en), .wr_addr(out_wr_addr), .wr_data(out_wr_data));

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled on every clock edge.
  always @(posedge clk) if (!rst) begin
    if (mem_rd_en && !mem_rd_ready) n_stall++;
    if (pix_seen > 0 && pix_seen < N && !mem_rd_valid) n_gap++;
    if (mem_rd_valid && !((pix_seen / W) >= 2 && (pix_seen % W) >= 2)) n_skip++;
    if (start) pix_seen = 0;
    else if (mem_rd_valid) pix_seen++;
    if (mem_rd_valid && pix_seen > W && (pix_seen % (W - 4)) == 0) n_wrap++;
    if (out_wr_en && out_wr_data == 8'hFF) n_sat++;
    if (out_wr_en && out_wr_data == 8'h00) n_zero++;
  end

  function automatic int ref_pix(input int r, input int c);
    int gx, gy, m;
    gx = (int'(u_mem.img_in[(r-1)*W + c+1]) + 2 * int'(u_mem.img_in[r*W + c+1]) + int'(u_mem.img_in[(r+1)*W + c+1]))
       - (int'(u_mem.img_in[(r-1)*W + c-1]) + 2 * int'(u_mem.img_in[r*W + c-1]) + int'(u_mem.img_in[(r+1)*W + c-1]));
    gy = (int'(u_mem.img_in[(r+1)*W + c-1]) + 2 * int'(u_mem.img_in[(r+1)*W + c]) + int'(u_mem.img_in[(r+1)*W + c+1]))
       - (int'(u_mem.img_in[(r-1)*W + c-1]) + 2 * int'(u_mem.img_in[(r-1)*W + c]) + int'(u_mem.img_in[(r-1)*W + c+1]));
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (m > 255) ? 255 : m;
  endfunction

  task automatic run_frame(input bit stalls, input bit random_img, input bit check_cycles);
    int cycles, reads0, writes0;
    for (int i = 0; i < N; i++) begin
      int r, c;
      r = i / W; c = i % W;
      if (random_img) u_mem.img_in[i] = pixel_t'($urandom);
      // blocks, a diagonal ramp and a flat region: sharp and zero gradients
      else u_mem.img_in[i] = (r < 100) ? pixel_t'(((r / 20) + (c / 20)) % 2 * 200 + 20)
                           : (r < 200) ? pixel_t'((r + c) % 256) : 8'd90;
      u_mem.img_out[i] = 8'h5A;
    end
    reads0 = u_mem.reads; writes0 = u_mem.writes;
    @(negedge clk) stall_en = stalls; start = 1'b1;
    @(posedge clk);
    cycles = 0;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    n_frames++;
    $display("frame %0d: %0d cycles, %0d reads, %0d writes", n_frames, cycles,
             u_mem.reads - reads0, u_mem.writes - writes0);
    checks++;
    if (u_mem.reads - reads0 != N) failures++;
    checks++;
    if (u_mem.writes - writes0 != (W - 2) * (H - 2)) failures++;
    if (check_cycles) begin
      checks++;
      if (cycles != N + LAT + 3) begin
        failures++;
        $display("cycle count %0d, expected %0d", cycles, N + LAT + 3);
      end
    end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (r == 0 || c == 0 || r == H - 1 || c == W - 1) begin
          if (u_mem.img_out[r*W + c] !== 8'h5A) failures++;
        end else if (int'(u_mem.img_out[r*W + c]) != ref_pix(r, c)) begin
          failures++;
          if (failures < 10) $display("pixel (%0d,%0d) = %0d, expected %0d", r, c,
                                      u_mem.img_out[r*W + c], ref_pix(r, c));
        end
      end
  endtask

  // Each write lands on an interior pixel and only once per frame.
  bit written [N];
  always @(posedge clk) begin
    if (start) for (int i = 0; i < N; i++) written[i] = 1'b0;
    if (out_wr_en) begin
      if (written[out_wr_addr]) failures++;
      written[out_wr_addr] = 1'b1;
    end
  end

  initial begin
    rst = 1'b1; start = 1'b0; stall_en = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_frame(1'b0, 1'b0, 1'b1);
    run_frame(1'b1, 1'b1, 1'b0);
    $display("stalls=%0d gaps=%0d skipped_windows=%0d saturated=%0d zero=%0d lb_wraps=%0d frames=%0d",
             n_stall, n_gap, n_skip, n_sat, n_zero, n_wrap, n_frames);
    checks += 7;
    if (n_stall == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_frames != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
