// axilite_example: the HLS tutorial's AXI4-Lite kernel, b += a + b.
//
// A kernel whose arguments and block control all sit behind one AXI4-Lite
// slave. Register map (byte addresses):
//   0x00 control   bit 0 ap_start (write 1 to start; cleared when the run is
//                  taken), bit 1 ap_done (cleared when read), bit 2 ap_idle,
//                  bit 3 ap_ready (cleared when read)
//   0x04 global irq enable (bit 0)
//   0x08 IP irq enable: bit 0 done, bit 1 ready (read/write)
//   0x0c IP irq status: bit 0 done, bit 1 ready (read; writing a 1
//        toggles the bit)
//   0x10 a
//   0x14 b: written as the input, read back as the result a + 2b
// `irq` (the interrupt) is high while the global enable is set and a status bit is 1.
// The map follows the source; the bit positions inside the control and
// irq registers follow the usual HLS layout and are this design's
// choice. A run takes one cycle after ap_start is seen.
//
// AXI4-Lite: 32-bit data, 5-bit address, one outstanding transaction per
// direction; write address and data may come in either order.
module axilite_example (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [4:0]  araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  output logic        irq
);

  localparam logic [4:0] A_CTRL = 5'h00, A_GIE = 5'h04, A_IER = 5'h08,
                         A_ISR  = 5'h0c, A_A   = 5'h10, A_B   = 5'h14;

  logic        ap_start, ap_done, ap_ready, busy;
  logic        gie;
  logic [1:0]  ier, isr;
  logic [31:0] reg_a, reg_b;

  // ---- write channel: latch address and data, then respond
  logic        aw_hold, w_hold;
  logic [4:0]  aw_q;
  logic [31:0] w_q;
  logic [3:0]  s_q;
  logic        do_write;

  assign awready  = !aw_hold && !bvalid;
  assign wready   = !w_hold && !bvalid;
  assign do_write = aw_hold && w_hold && !bvalid;
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = s[i] ? d[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  // ---- read channel
  assign arready = !rvalid;
  logic do_read;
  assign do_read = arvalid && arready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_hold  <= 1'b0;
      w_hold   <= 1'b0;
      aw_q     <= '0;
      w_q      <= '0;
      s_q      <= '0;
      bvalid   <= 1'b0;
      rvalid   <= 1'b0;
      rdata    <= '0;
      ap_start <= 1'b0;
      ap_done  <= 1'b0;
      ap_ready <= 1'b0;
      busy     <= 1'b0;
      gie      <= 1'b0;
      ier      <= '0;
      isr      <= '0;
      reg_a    <= '0;
      reg_b    <= '0;
    end else begin
      if (awvalid && awready) begin aw_hold <= 1'b1; aw_q <= awaddr; end
      if (wvalid && wready)   begin w_hold  <= 1'b1; w_q <= wdata; s_q <= wstrb; end
      if (bvalid && bready) bvalid <= 1'b0;

      // the function body: one cycle per run
      if (busy) begin
        reg_b    <= reg_b + reg_a + reg_b;
        busy     <= 1'b0;
        ap_done  <= 1'b1;
        ap_ready <= 1'b1;
        if (ier[0]) isr[0] <= 1'b1;
        if (ier[1]) isr[1] <= 1'b1;
      end else if (ap_start) begin
        ap_start <= 1'b0;
        busy     <= 1'b1;
      end

      if (do_write) begin
        aw_hold <= 1'b0;
        w_hold  <= 1'b0;
        bvalid  <= 1'b1;
        unique case (aw_q)
          A_CTRL: if (s_q[0] && w_q[0]) ap_start <= 1'b1;
          A_GIE:  if (s_q[0]) gie <= w_q[0];
          A_IER:  if (s_q[0]) ier <= w_q[1:0];
          A_ISR:  if (s_q[0]) isr <= isr ^ w_q[1:0];
          A_A:    reg_a <= merge(reg_a, w_q, s_q);
          A_B:    reg_b <= merge(reg_b, w_q, s_q);
          default: ;
        endcase
      end

      if (rvalid && rready) rvalid <= 1'b0;
      if (do_read) begin
        rvalid <= 1'b1;
        unique case (araddr)
          A_CTRL: begin
            rdata <= {28'd0, ap_ready, !(ap_start || busy), ap_done, ap_start};
            ap_done  <= 1'b0;
            ap_ready <= 1'b0;
          end
          A_GIE:  rdata <= {31'd0, gie};
          A_IER:  rdata <= {30'd0, ier};
          A_ISR:  rdata <= {30'd0, isr};
          A_A:    rdata <= reg_a;
          A_B:    rdata <= reg_b;
          default: rdata <= '0;
        endcase
      end
    end
  end

  assign irq = gie && (isr != 2'b00);

  assert property (@(posedge clk) disable iff (!rst_n)
                   bvalid && !bready |=> bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   rvalid && !rready |=> rvalid && $stable(rdata));

endmodule
