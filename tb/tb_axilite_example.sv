// tb_axilite_example: drives the AXI4-Lite kernel as a host driver would:
// writes a and b, sets ap_start, polls the control register for ap_done,
// reads b back and compares it with a + 2b; also checks ap_idle, the
// clear-on-read of ap_done, the interrupt enables, the toggle-on-write
// status register, byte strobes and address/data arriving in either order.
module tb_axilite_example;
  logic        clk = 0, rst_n;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready, irq;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  int checks = 0, failures = 0;

  axilite_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [4:0] ad, logic [31:0] d, logic [3:0] s = 4'hf, bit data_first = 0);
    @(negedge clk);
    if (data_first) begin
      wvalid = 1; wdata = d; wstrb = s;
      @(posedge clk); while (!wready) @(posedge clk);
      @(negedge clk) wvalid = 0;
      awvalid = 1; awaddr = ad;
      @(posedge clk); while (!awready) @(posedge clk);
      @(negedge clk) awvalid = 0;
    end else begin
      awvalid = 1; awaddr = ad; wvalid = 1; wdata = d; wstrb = s;
      fork
        begin @(posedge clk); while (!awready) @(posedge clk); @(negedge clk) awvalid = 0; end
        begin @(posedge clk); while (!wready)  @(posedge clk); @(negedge clk) wvalid = 0; end
      join
    end
    bready = 1;
    @(posedge clk); while (!bvalid) @(posedge clk);
    @(negedge clk) bready = 0;
  endtask

  task automatic rd(logic [4:0] ad, output logic [31:0] d);
    @(negedge clk);
    arvalid = 1; araddr = ad;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk) arvalid = 0;
    rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(posedge clk);
    @(negedge clk) rready = 0;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic run(logic [31:0] a, logic [31:0] b, bit data_first);
    logic [31:0] d;
    int polls = 0;
    wr(5'h10, a, 4'hf, data_first);
    wr(5'h14, b, 4'hf, !data_first);
    rd(5'h10, d); expect_eq("a readback", d, a);
    wr(5'h00, 32'h1);
    do begin rd(5'h00, d); polls++; end while (!d[1] && polls < 20);
    expect_eq("ap_done seen", 32'(d[1]), 1);
    expect_eq("ap_idle with done", 32'(d[2]), 1);
    rd(5'h00, d); expect_eq("ap_done cleared on read", 32'(d[1]), 0);
    rd(5'h14, d); expect_eq("b = a + 2b", d, a + b + b);
  endtask

  initial begin
    logic [31:0] d;
    rst_n = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(5'h00, d); expect_eq("idle after reset", d, 32'h4);
    run(32'd3, 32'd4, 0);
    run(32'd105, 32'd77, 1);
    for (int i = 0; i < 20; i++) run($urandom, $urandom, i[0]);
    // byte strobes
    wr(5'h10, 32'h1122_3344);
    wr(5'h10, 32'hffff_ffff, 4'b0010);
    rd(5'h10, d); expect_eq("strobed write", d, 32'h1122_ff44);
    // interrupts
    checks++; if (irq) begin failures++; $display("FAIL irq without enable"); end
    wr(5'h04, 32'h1);
    wr(5'h08, 32'h1);
    rd(5'h08, d); expect_eq("IER", d, 32'h1);
    wr(5'h00, 32'h1);
    repeat (4) @(negedge clk);
    rd(5'h0c, d); expect_eq("ISR done set", d, 32'h1);
    checks++; if (!irq) begin failures++; $display("FAIL irq not raised"); end
    wr(5'h0c, 32'h1);
    rd(5'h0c, d); expect_eq("ISR toggled clear", d, 32'h0);
    checks++; if (irq) begin failures++; $display("FAIL irq not cleared"); end
    wr(5'h04, 32'h0);
    rd(5'h04, d); expect_eq("GIE", d, 32'h0);
    checks++; if (bresp != 0 || rresp != 0) begin failures++; $display("FAIL response code"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
