// tb_gcd: runs the gcd block on the worked example (105, 77) and on random
// pairs, compares with Euclid's remainder form computed here, and checks
// the handshake: ap_idle drops on start, ap_done and ap_ready are one-cycle
// pulses together with the result, and the run takes one cycle per
// subtraction step plus two.
module tb_gcd;
  logic        ap_clk = 0, ap_rst, ap_start;
  logic        ap_done, ap_idle, ap_ready;
  logic [31:0] Ain, Bin, ap_return;
  int checks = 0, failures = 0;

  gcd #(.WIDTH(32)) dut (.*);

  always #5 ap_clk = ~ap_clk;

  initial begin
    repeat (200000) @(posedge ap_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_gcd(int unsigned x, int unsigned y);
    while (y != 0) begin
      int unsigned t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int steps(int unsigned x, int unsigned y);
    int n = 0;
    if (x == 0) return 0;
    while (y != 0) begin
      if (x > y) x -= y; else y -= x;
      n++;
    end
    return n;
  endfunction

  task automatic run(int unsigned x, int unsigned y);
    int cyc = 0;
    @(negedge ap_clk);
    Ain = x; Bin = y; ap_start = 1;
    @(negedge ap_clk);
    checks++;
    if (ap_idle) begin failures++; $display("FAIL ap_idle still high after start"); end
    while (!ap_done) begin
      @(negedge ap_clk);
      cyc++;
      if (cyc > 10000) break;
    end
    ap_start = 0;
    checks++;
    if (ap_return != ref_gcd(x, y) || !ap_ready) begin
      failures++;
      $display("FAIL gcd(%0d,%0d) = %0d, want %0d", x, y, ap_return, ref_gcd(x, y));
    end
    checks++;
    if (cyc + 1 != steps(x, y) + 2) begin
      failures++;
      $display("FAIL gcd(%0d,%0d) took %0d cycles, want %0d", x, y, cyc + 1, steps(x, y) + 2);
    end
    @(negedge ap_clk);
    checks++;
    if (ap_done || ap_ready || !ap_idle) begin
      failures++;
      $display("FAIL done/ready not a single pulse or not idle afterwards");
    end
  endtask

  initial begin
    ap_rst = 1; ap_start = 0; Ain = 0; Bin = 0;
    repeat (3) @(negedge ap_clk);
    ap_rst = 0;
    checks++;
    if (!ap_idle) begin failures++; $display("FAIL not idle after reset"); end
    run(105, 77);
    run(77, 105);
    run(12, 12);
    run(0, 9);
    run(9, 0);
    run(1, 1000);
    repeat (100) run($urandom_range(1, 2000), $urandom_range(1, 2000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
