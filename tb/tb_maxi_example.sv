// tb_maxi_example: starts the AXI4 master kernel on a memory model (an
// AXI4 slave with random ready and valid gaps), then
// checks that exactly the 50 words at the given address were incremented
// and nothing around them changed, for several base addresses.
module tb_maxi_example;
  logic        clk = 0, rst_n;
  logic        ap_start, ap_done, ap_idle, ap_ready;
  logic [63:0] a, araddr, awaddr;
  logic [7:0]  arlen, awlen;
  logic [2:0]  arsize, awsize;
  logic [1:0]  arburst, awburst, rresp, bresp;
  logic        arvalid, arready, rlast, rvalid, rready;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [31:0] rdata, wdata;
  logic [3:0]  wstrb;
  logic        resp_err;
  int checks = 0, failures = 0;

  maxi_example #(.DEPTH(50)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MEMW = 1024;
  int wlast_errors;

  axi4_mem_model #(.MEMW(MEMW)) u_mem (.*);
  `define MEM u_mem.mem

  task automatic run(int base_word);
    logic [31:0] prev_mem [MEMW];
    int cyc = 0;
    for (int i = 0; i < MEMW; i++) prev_mem[i] = `MEM[i];
    @(negedge clk);
    a = 64'(base_word * 4); ap_start = 1;
    @(negedge clk);
    checks++; if (ap_idle) begin failures++; $display("FAIL still idle"); end
    while (!ap_done && cyc < 5000) begin @(negedge clk); cyc++; end
    ap_start = 0;
    checks++; if (!ap_done) begin failures++; $display("FAIL no ap_done"); end
    for (int i = 0; i < MEMW; i++) begin
      logic [31:0] want;
      want = (i >= base_word && i < base_word + 50) ? prev_mem[i] + 1 : prev_mem[i];
      checks++;
      if (`MEM[i] !== want) begin
        failures++;
        $display("FAIL word %0d = %h want %h", i, `MEM[i], want);
      end
    end
    checks++; if (arsize != 3'd2 || arburst != 2'b01 || arlen != 8'd49) begin failures++; $display("FAIL AR fields"); end
  endtask

  initial begin
    rst_n = 0; ap_start = 0; a = 0;
    for (int i = 0; i < MEMW; i++) `MEM[i] = $urandom;
    `MEM[10] = 32'hffff_ffff;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(0);
    run(7);
    run(900);
    checks++; if (wlast_errors != 0) begin failures++; $display("FAIL wlast"); end
    checks++; if (resp_err) begin failures++; $display("FAIL resp_err"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
