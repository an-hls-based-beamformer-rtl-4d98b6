// axis_example: AXI4-Stream kernel that adds 5 to every 32-bit word.
//
// The HLS tutorial's stream example: each transfer read from stream A is
// passed to stream B with its data increased by 5; keep, strobe and last
// travel with it unchanged (the ap_axiu<32,0,0,0> packet has no user, id or
// dest fields). One register stage with back-pressure: interval 1, latency 1.
module axis_example (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a_tdata,
  input  logic [3:0]  a_tkeep,
  input  logic [3:0]  a_tstrb,
  input  logic        a_tlast,
  input  logic        a_tvalid,
  output logic        a_tready,
  output logic [31:0] b_tdata,
  output logic [3:0]  b_tkeep,
  output logic [3:0]  b_tstrb,
  output logic        b_tlast,
  output logic        b_tvalid,
  input  logic        b_tready
);

  assign a_tready = !b_tvalid || b_tready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_tvalid <= 1'b0;
      b_tdata  <= '0;
      b_tkeep  <= '0;
      b_tstrb  <= '0;
      b_tlast  <= 1'b0;
    end else if (a_tready) begin
      b_tvalid <= a_tvalid;
      if (a_tvalid) begin
        b_tdata <= a_tdata + 32'd5;
        b_tkeep <= a_tkeep;
        b_tstrb <= a_tstrb;
        b_tlast <= a_tlast;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   b_tvalid && !b_tready |=> b_tvalid && $stable(b_tdata));

endmodule
