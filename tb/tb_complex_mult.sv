// tb_complex_mult: checks (a+ib)(c+id) against integer arithmetic for the
// extreme operand values and random ones, and that the result holds while
// the enable is low.
module tb_complex_mult;
  localparam int W = 8;
  logic clk = 0;
  logic en;
  logic signed [W-1:0] a, b, c, d;
  logic signed [2*W:0] re, im;
  int checks = 0, failures = 0;

  complex_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int ia, int ib, int ic, int id);
    int er, ei;
    er = ia * ic - ib * id;
    ei = ia * id + ib * ic;
    @(negedge clk);
    a = W'(ia); b = W'(ib); c = W'(ic); d = W'(id); en = 1;
    @(negedge clk);
    en = 0;
    checks++;
    if (int'(re) != er || int'(im) != ei) begin
      failures++;
      $display("FAIL (%0d+i*%0d)*(%0d+i*%0d): got %0d+i*%0d want %0d+i*%0d",
               ia, ib, ic, id, re, im, er, ei);
    end
    // hold with enable low
    a = W'(ia + 1);
    @(negedge clk);
    checks++;
    if (int'(re) != er || int'(im) != ei) begin
      failures++;
      $display("FAIL result changed with enable low");
    end
  endtask

  initial begin
    en = 0; a = 0; b = 0; c = 0; d = 0;
    apply(-128, -128, -128, -128);
    apply(127, -128, -128, 127);
    apply(-128, 127, 127, -128);
    apply(3, 4, 5, -6);
    repeat (300)
      apply($signed($urandom_range(255)) - 128, $signed($urandom_range(255)) - 128,
            $signed($urandom_range(255)) - 128, $signed($urandom_range(255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
