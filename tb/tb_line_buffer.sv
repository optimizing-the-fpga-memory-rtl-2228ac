// tb_line_buffer: self-checking test of the block-RAM delay line.
//
// Drives random data with a random enable (about 70 % of cycles) and keeps
// every enabled input in a history. After the n-th enabled edge, once more
// than DEPTH values have gone in, `dout` must equal input n-DEPTH; between
// enables it must hold. The pointer wraps many times. A reset in the middle
// checks that the delay restarts from zero.
module tb_line_buffer;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 316;

  logic             clk = 1'b0;
  logic             rst;
  logic             en;
  logic [WIDTH-1:0] din, dout;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];
  logic [WIDTH-1:0] prev;

  line_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      en  = ($urandom_range(9) < 7);
      din = WIDTH'($urandom);
      prev = dout;
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_back(din);
        if (hist.size() > DEPTH) begin
          checks++;
          if (dout !== hist[hist.size()-1-DEPTH]) begin
            failures++;
            if (failures < 10) $display("mismatch at n=%0d: dout=%0h exp=%0h",
                                        hist.size(), dout, hist[hist.size()-1-DEPTH]);
          end
        end
      end else begin
        checks++;
        if (dout !== prev) failures++;
      end
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(5 * DEPTH);
    // reset restarts the delay line
    @(negedge clk) rst = 1'b1; en = 1'b0;
    @(negedge clk) rst = 1'b0;
    checks++;
    if (dout !== '0) failures++;
    hist.delete();
    run(3 * DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
