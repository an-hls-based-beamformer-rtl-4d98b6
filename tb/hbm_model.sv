// hbm_model: behavioural model of the card's buffer memory (HBM) as seen by
// the reorder kernel, for simulation only. Word-addressed, 512-bit words;
// writes are stored when taken; each read request taken is answered, in
// order, LAT cycles later. With STALL set, write and read ready drop at
// random (about one cycle in four) to imitate a busy memory controller.
module hbm_model #(
  parameter int AW    = 10,
  parameter int LAT   = 4,
  parameter bit STALL = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [511:0]  wr_data,
  output logic          wr_ready,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_ready,
  output logic [511:0]  rd_data,
  output logic          rd_valid
);

  logic [511:0] mem [2**AW];
  logic [511:0] pipe_d [LAT];
  logic         pipe_v [LAT];

  initial begin
    wr_ready = 1'b1;
    rd_ready = 1'b1;
  end

  always @(negedge clk) begin
    wr_ready <= !STALL || ($urandom_range(3) != 0);
    rd_ready <= !STALL || ($urandom_range(3) != 0);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe_v[i] <= 1'b0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      if (wr_en && wr_ready) mem[wr_addr] <= wr_data;
      pipe_v[0] <= rd_en && rd_ready;
      pipe_d[0] <= mem[rd_addr];
      for (int i = 1; i < LAT; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      rd_valid <= pipe_v[LAT-1];
      rd_data  <= pipe_d[LAT-1];
    end
  end

endmodule
