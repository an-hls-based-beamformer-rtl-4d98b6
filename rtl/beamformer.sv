// beamformer: the computing-unit matrix that forms NBEAM beams.
//
// Each input word holds one time sample of all NELEMENT elements of one
// channel (order (T, F, T, E)). For every beam b the kernel computes
//   y_b = sum_e w[f][b][e] * x_e
// with complex 8-bit samples x and complex 8-bit weights w that depend on
// the channel f and beam b. NBEAM x NELEMENT complex multipliers
// (complex_mult) work in parallel, one adder tree per beam sums over the
// elements, and the sum is scaled down by SHIFT bits and saturated to 8-bit
// real and imaginary parts, giving one output word per input word that holds
// all NBEAM beams of that time sample (order (T, F, T, B)).
//
// Weights: an on-chip RAM of NCHANNEL x NBEAM words, one bank per beam, each
// word the NELEMENT weights of one (channel, beam) in the lane layout of the
// data. The host loads it through wt_we / wt_addr = {channel, beam} /
// wt_data (in the source design the host puts the beam weights into HBM).
//
// Timing: interval 1 (one word per cycle), latency 4 cycles: weight read,
// products, adder tree, scaling into the output register. The whole
// pipeline stalls while the output is held by back-pressure. The source
// design reports interval 1 and latency 82 cycles for its HLS dataflow
// version; this design's pipeline is shorter. The scaling and saturation
// are this design's choice: the source does not give the output format.
module beamformer
  import bf_pkg::*;
#(
  parameter int NCHANNEL = 32,
  parameter int NELEMENT = 32,
  parameter int NBEAM    = 32,
  parameter int SHIFT    = 8,
  localparam int CW = $clog2(NCHANNEL),
  localparam int BW = $clog2(NBEAM)
) (
  input  logic          clk,
  input  logic          rst_n,
  // weight loading
  input  logic          wt_we,
  input  logic [CW+BW-1:0] wt_addr,
  input  word_t         wt_data,
  // pre-beamformed data
  input  word_t         s_tdata,
  input  side_t         s_tuser,
  input  logic          s_tlast,
  input  logic          s_tvalid,
  output logic          s_tready,
  // beamformed data
  output word_t         m_tdata,
  output side_t         m_tuser,
  output logic          m_tlast,
  output logic          m_tvalid,
  input  logic          m_tready
);

  localparam int PW = 2*W + 1;                  // product width
  localparam int SW = PW + $clog2(NELEMENT);    // sum width

  word_t wram [NBEAM][NCHANNEL];

  logic advance;
  assign advance  = !m_tvalid || m_tready;
  assign s_tready = advance;

  // stage 0: sample and weights
  word_t  x0;
  word_t  w0 [NBEAM];
  side_t  side0, side1, side2;
  logic   v0, v1, v2, last0, last1, last2;

  always_ff @(posedge clk) begin
    if (wt_we) wram[wt_addr[BW-1:0]][wt_addr[CW+BW-1:BW]] <= wt_data;
    if (advance)
      for (int b = 0; b < NBEAM; b++) w0[b] <= wram[b][s_tuser.channel_id[CW-1:0]];
  end

  // stage 1: products
  logic signed [PW-1:0] p_re [NBEAM][NELEMENT];
  logic signed [PW-1:0] p_im [NBEAM][NELEMENT];

  for (genvar b = 0; b < NBEAM; b++) begin : g_beam
    for (genvar e = 0; e < NELEMENT; e++) begin : g_elem
      complex_mult #(.W(W)) u_cu (
        .clk (clk),
        .en  (advance),
        .a   (x0[SAMPLE_W*e +: W]),
        .b   (x0[SAMPLE_W*e + W +: W]),
        .c   (w0[b][SAMPLE_W*e +: W]),
        .d   (w0[b][SAMPLE_W*e + W +: W]),
        .re  (p_re[b][e]),
        .im  (p_im[b][e])
      );
    end
  end

  // stage 2: adder tree per beam
  logic signed [SW-1:0] s_re [NBEAM];
  logic signed [SW-1:0] s_im [NBEAM];

  always_ff @(posedge clk) begin
    if (advance) begin
      for (int b = 0; b < NBEAM; b++) begin
        logic signed [SW-1:0] acc_re, acc_im;
        acc_re = '0;
        acc_im = '0;
        for (int e = 0; e < NELEMENT; e++) begin
          acc_re += SW'(p_re[b][e]);
          acc_im += SW'(p_im[b][e]);
        end
        s_re[b] <= acc_re;
        s_im[b] <= acc_im;
      end
    end
  end

  // scaling with saturation to W bits
  function automatic logic [W-1:0] requant(logic signed [SW-1:0] v);
    logic signed [SW-1:0] t;
    t = v >>> SHIFT;
    if (t > SW'(2**(W-1) - 1))     return W'(2**(W-1) - 1);
    else if (t < -SW'(2**(W-1)))   return W'(-(2**(W-1)));
    else                           return t[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0;
      last0 <= 1'b0; last1 <= 1'b0; last2 <= 1'b0;
      side0 <= '0; side1 <= '0; side2 <= '0;
      x0 <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      m_tuser  <= '0;
      m_tdata  <= '0;
    end else if (advance) begin
      v0 <= s_tvalid;   last0 <= s_tlast;  side0 <= s_tuser;  x0 <= s_tdata;
      v1 <= v0;         last1 <= last0;    side1 <= side0;
      v2 <= v1;         last2 <= last1;    side2 <= side1;
      m_tvalid <= v2;
      m_tlast  <= last2;
      m_tuser  <= side2;
      for (int b = 0; b < NBEAM; b++)
        m_tdata[SAMPLE_W*b +: SAMPLE_W] <= {requant(s_im[b]), requant(s_re[b])};
    end
  end

  initial assert (NBEAM == LANES && NELEMENT == LANES)
    else $error("NBEAM and NELEMENT must equal LANES");

endmodule
