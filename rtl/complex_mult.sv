// complex_mult: one computing unit of the beamformer, (a + ib) * (c + id).
//
// Multiplies a complex sample a + ib by a complex weight c + id, all parts
// W-bit two's complement, giving re = ac - bd and im = ad + bc at full
// precision (2W+1 bits). The four products are formed directly; how the
// source design maps them onto DSP slices is not given, so this is the
// plainest form of the operation it names.
//
// Timing: one registered stage; the result appears the cycle after `en` is
// high with valid operands, and holds while `en` is low.
module complex_mult #(
  parameter int W = 8
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic signed [W-1:0]   a,   // sample, real
  input  logic signed [W-1:0]   b,   // sample, imaginary
  input  logic signed [W-1:0]   c,   // weight, real
  input  logic signed [W-1:0]   d,   // weight, imaginary
  output logic signed [2*W:0]   re,
  output logic signed [2*W:0]   im
);

  logic signed [2*W-1:0] ac, bd, ad, bc;

  always_comb begin
    ac = a * c;
    bd = b * d;
    ad = a * d;
    bc = b * c;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      re <= (2*W+1)'(ac) - (2*W+1)'(bd);
      im <= (2*W+1)'(ad) + (2*W+1)'(bc);
    end
  end

endmodule
