// axi4_mem_model: behavioural AXI4 slave memory for simulation only. One
// read and one write burst at a time (INCR, 32-bit beats), random ready and
// valid gaps, OKAY responses. The memory array `mem` (MEMW words) is reached
// hierarchically by the testbench to preload and inspect it.
module axi4_mem_model #(
  parameter int MEMW = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [63:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  output int          wlast_errors
);

  localparam int MW = $clog2(MEMW);
  logic [31:0] mem [MEMW];

  logic [63:0] rd_addr, wr_addr;
  int          rd_left, wr_left;
  bit          rd_busy, wr_busy, b_pend;

  always @(posedge clk) begin
    if (!rst_n) begin
      rd_busy <= 0; wr_busy <= 0; b_pend <= 0; wlast_errors <= 0;
    end else begin
      if (arvalid && arready) begin
        rd_busy <= 1; rd_addr <= araddr; rd_left <= arlen + 1;
      end
      if (rvalid && rready) begin
        rd_addr <= rd_addr + 4; rd_left <= rd_left - 1;
        if (rd_left == 1) rd_busy <= 0;
      end
      if (awvalid && awready) begin
        wr_busy <= 1; wr_addr <= awaddr; wr_left <= awlen + 1;
      end
      if (wvalid && wready) begin
        mem[wr_addr[MW+1:2]] <= wdata;
        wr_addr <= wr_addr + 4; wr_left <= wr_left - 1;
        if (wlast != (wr_left == 1)) wlast_errors <= wlast_errors + 1;
        if (wr_left == 1) begin wr_busy <= 0; b_pend <= 1; end
      end
      if (bvalid && bready) b_pend <= 0;
    end
  end

  always @(negedge clk) begin
    arready = !rd_busy && ($urandom_range(1) == 0);
    awready = !wr_busy && !b_pend && ($urandom_range(1) == 0);
    rvalid  = rd_busy && ($urandom_range(3) != 0);
    wready  = wr_busy && ($urandom_range(3) != 0);
    bvalid  = b_pend;
  end

  assign rdata = mem[rd_addr[MW+1:2]];
  assign rlast = (rd_left == 1);
  assign rresp = 2'b00;
  assign bresp = 2'b00;

endmodule
