// tb_axis_example: streams random words through the +5 kernel with random
// gaps on the input and random back-pressure on the output, and checks
// every output word, its keep/strobe/last, and their order. With a free
// output the kernel must take and deliver one word per cycle.
module tb_axis_example;
  logic        clk = 0, rst_n;
  logic [31:0] a_tdata, b_tdata;
  logic [3:0]  a_tkeep, a_tstrb, b_tkeep, b_tstrb;
  logic        a_tlast, a_tvalid, a_tready, b_tlast, b_tvalid, b_tready;
  int checks = 0, failures = 0;
  logic [40:0] sent [$];
  bit free_run;

  axis_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  int got = 0, run_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (b_tvalid && b_tready) begin
      logic [40:0] e;
      e = sent.pop_front();
      checks++;
      if (b_tdata != e[31:0] + 32'd5 || b_tkeep != e[35:32] || b_tstrb != e[39:36] ||
          b_tlast != e[40]) begin
        failures++;
        $display("FAIL word %0d: got %h want %h", got, b_tdata, e[31:0] + 32'd5);
      end
      got++;
    end
    if (free_run) run_len = (b_tvalid && b_tready) ? run_len + 1 : run_len;
  end

  initial begin
    rst_n = 0; a_tvalid = 0; a_tdata = 0; a_tkeep = 0; a_tstrb = 0; a_tlast = 0;
    b_tready = 0; free_run = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin : drive
        for (int i = 0; i < 2000; i++) begin
          @(negedge clk);
          while ($urandom_range(3) == 0) begin a_tvalid = 0; @(negedge clk); end
          a_tvalid = 1;
          a_tdata  = (i == 5) ? 32'hffff_fffd : $urandom;
          a_tkeep  = 4'($urandom); a_tstrb = 4'($urandom); a_tlast = (i % 7 == 6);
          sent.push_back({a_tlast, a_tstrb, a_tkeep, a_tdata});
          @(posedge clk);
          while (!a_tready) @(posedge clk);
        end
        @(negedge clk) a_tvalid = 0;
      end
      begin : sink
        while (got < 2000) begin
          @(negedge clk) b_tready = ($urandom_range(3) != 0);
        end
      end
    join
    // throughput: 100 words back to back with a free output
    @(negedge clk);
    b_tready = 1; free_run = 1; run_len = 0;
    for (int i = 0; i < 100; i++) begin
      a_tvalid = 1; a_tdata = i; a_tkeep = 4'hf; a_tstrb = 4'hf; a_tlast = 0;
      sent.push_back({1'b0, 4'hf, 4'hf, 32'(i)});
      @(negedge clk);
    end
    a_tvalid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (run_len != 100) begin failures++; $display("FAIL %0d of 100 words in 101 cycles", run_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
