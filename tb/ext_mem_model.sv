// ext_mem_model: behavioural model of the external image memory, for
// simulation only (not synthesizable as written, not part of the design).
//
// Holds an input image `img_in` and an output image `img_out`, both
// NWORDS pixels, filled and inspected by the testbench through
// hierarchical references. Reads: a request (rd_en, rd_addr) is accepted
// when `rd_ready` is high; with `stall_en` set, `rd_ready` is low on about
// one cycle in three. Accepted reads return in order exactly LAT cycles
// later on rd_valid/rd_data. Writes are accepted every cycle. The model
// counts accepted reads, stall cycles and writes.
module ext_mem_model #(
  parameter int unsigned NWORDS = 320 * 320,
  parameter int unsigned AW     = 17,
  parameter int unsigned LAT    = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          stall_en,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_ready,
  output logic          rd_valid,
  output logic [7:0]    rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data
);

  logic [7:0] img_in  [NWORDS];
  logic [7:0] img_out [NWORDS];
  int unsigned reads = 0, stalls = 0, writes = 0;

  logic       v_pipe [LAT];
  logic [7:0] d_pipe [LAT];

  always_ff @(negedge clk) begin
    rd_ready <= !stall_en || ($urandom_range(2) != 0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) begin
        v_pipe[i] <= 1'b0;
        d_pipe[i] <= '0;
      end
    end else begin
      v_pipe[0] <= rd_en && rd_ready;
      d_pipe[0] <= (rd_en && rd_ready) ? img_in[rd_addr] : 8'h00;
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        d_pipe[i] <= d_pipe[i-1];
      end
      if (rd_en && rd_ready) reads <= reads + 1;
      if (rd_en && !rd_ready) stalls <= stalls + 1;
      if (wr_en) begin
        img_out[wr_addr] <= wr_data;
        writes <= writes + 1;
      end
    end
  end

  assign rd_valid = v_pipe[LAT-1];
  assign rd_data  = d_pipe[LAT-1];

endmodule
