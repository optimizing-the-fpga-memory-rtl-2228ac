// tb_pixel_reader: self-checking test of the read-address generator.
//
// After `start` the reader must issue exactly IMG_W*IMG_H requests with
// addresses 0, 1, 2, ... in order, hold the address while `rd_ready` is
// low (random stalls), ignore a second `start` while busy, and drop
// `rd_en`/`busy` after the last request. With `rd_ready` always high, the
// full 320 x 320 frame must take exactly 102,400 request cycles. A small
// 5 x 4 instance checks the stall behaviour.
module tb_pixel_reader;
  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        start_f, en_f, rdy_f, busy_f;
  logic [16:0] addr_f;
  logic        start_s, en_s, rdy_s, busy_s;
  logic [4:0]  addr_s;

  pixel_reader dut_f (.clk(clk), .rst(rst), .start(start_f), .rd_en(en_f), .rd_addr(addr_f),
                      .rd_ready(rdy_f), .busy(busy_f));
  pixel_reader #(.IMG_W(5), .IMG_H(4)) dut_s (.clk(clk), .rst(rst), .start(start_s), .rd_en(en_s),
                      .rd_addr(addr_s), .rd_ready(rdy_s), .busy(busy_s));

  // Run one frame on the full-size reader; count accepted requests and cycles.
  task automatic frame_full();
    int accepted, cycles;
    accepted = 0; cycles = 0;
    @(negedge clk) start_f = 1'b1; rdy_f = 1'b1;
    @(negedge clk) start_f = 1'b0;
    while (en_f) begin
      checks++;
      if (addr_f !== 17'(accepted)) begin
        failures++;
      end
      accepted++;
      cycles++;
      @(negedge clk);
    end
    checks += 2;
    if (accepted != 320 * 320) failures++;
    if (cycles != 102400) failures++;
    $display("full frame: %0d requests in %0d cycles", accepted, cycles);
  endtask

  task automatic frame_small();
    int accepted, stalls;
    logic [4:0] last;
    accepted = 0; stalls = 0;
    @(negedge clk) start_s = 1'b1; rdy_s = 1'b0;
    @(negedge clk) start_s = 1'b0;
    while (en_s) begin
      checks++;
      if (addr_s !== 5'(accepted) || !busy_s) failures++;
      rdy_s = ($urandom_range(1) == 1);
      if ($urandom_range(7) == 0) start_s = 1'b1;  // ignored while busy
      @(posedge clk);
      if (rdy_s) accepted++; else stalls++;
      @(negedge clk);
      start_s = 1'b0;
    end
    checks += 3;
    if (accepted != 20) failures++;
    if (stalls == 0) failures++;
    if (busy_s) failures++;
    $display("small frame: %0d requests, %0d stall cycles", accepted, stalls);
  endtask

  initial begin
    rst = 1'b1; start_f = 0; rdy_f = 1; start_s = 0; rdy_s = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    frame_small();
    frame_small();
    frame_full();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
