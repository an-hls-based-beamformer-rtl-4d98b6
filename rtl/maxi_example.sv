// maxi_example: the HLS tutorial's AXI4 master kernel, a[i] += 1 for 50 words.
//
// When started, the kernel reads DEPTH 32-bit words from memory at byte
// address `a` in one INCR burst, adds 1 to each, and writes them back in one
// burst, then pulses ap_done. This is what the pipelined loop of the
// tutorial becomes once HLS infers bursts; the local buffer of DEPTH words
// between the read and the write burst is this design's choice.
//
// Interfaces: ap_start/ap_done/ap_idle/ap_ready block handshake and the
// argument `a` as plain ports (in the tutorial they sit behind an AXI4-Lite
// slave); an AXI4 master with 64-bit addresses and 32-bit data, no ids.
// `a` must be 4-byte aligned and the burst must not cross a 4 KB boundary.
//
// Timing: one beat per cycle when the memory keeps up; a run takes about
// 2*DEPTH cycles plus the memory latency.
module maxi_example #(
  parameter int DEPTH = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic [63:0] a,
  // AXI4 master
  output logic [63:0] araddr,
  output logic [7:0]  arlen,
  output logic [2:0]  arsize,
  output logic [1:0]  arburst,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rlast,
  input  logic        rvalid,
  output logic        rready,
  output logic [63:0] awaddr,
  output logic [7:0]  awlen,
  output logic [2:0]  awsize,
  output logic [1:0]  awburst,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wlast,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic        resp_err     // a read or write response was not OKAY
);

  localparam int IW = $clog2(DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_W, S_B} state_t;
  state_t        state;
  logic [31:0]   buffer [DEPTH];
  logic [IW-1:0] idx;
  logic [63:0]   base;

  assign ap_idle = (state == S_IDLE);
  assign arlen   = 8'(DEPTH - 1);
  assign awlen   = 8'(DEPTH - 1);
  assign arsize  = 3'd2;
  assign awsize  = 3'd2;
  assign arburst = 2'b01;
  assign awburst = 2'b01;
  assign araddr  = base;
  assign awaddr  = base;
  assign arvalid = (state == S_AR);
  assign awvalid = (state == S_AW);
  assign rready  = (state == S_R);
  assign wvalid  = (state == S_W);
  assign wdata   = buffer[idx];
  assign wstrb   = 4'hf;
  assign wlast   = (idx == IW'(DEPTH - 1));
  assign bready  = (state == S_B);

  always_ff @(posedge clk) begin
    if (rvalid && rready) buffer[idx] <= rdata + 32'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      idx      <= '0;
      base     <= '0;
      ap_done  <= 1'b0;
      ap_ready <= 1'b0;
      resp_err <= 1'b0;
    end else begin
      ap_done  <= 1'b0;
      ap_ready <= 1'b0;
      unique case (state)
        S_IDLE: if (ap_start && !ap_done) begin
          base     <= a;
          resp_err <= 1'b0;
          state    <= S_AR;
        end
        S_AR: if (arready) begin
          idx   <= '0;
          state <= S_R;
        end
        S_R: if (rvalid) begin
          if (rresp != 2'b00) resp_err <= 1'b1;
          idx <= idx + 1'b1;
          if (rlast) state <= S_AW;
        end
        S_AW: if (awready) begin
          idx   <= '0;
          state <= S_W;
        end
        S_W: if (wready) begin
          idx <= idx + 1'b1;
          if (wlast) state <= S_B;
        end
        S_B: if (bvalid) begin
          if (bresp != 2'b00) resp_err <= 1'b1;
          ap_done  <= 1'b1;
          ap_ready <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   rvalid && rready && rlast |-> idx == IW'(DEPTH - 1));

endmodule
