// gcd: greatest common divisor by repeated subtraction (Euclid).
//
// The circuit the HLS tutorial synthesises from a C function: starting from
// (a, b) = (Ain, Bin) it replaces the larger of the two by their difference
// (b when they are equal) until b is zero; a is then the result, e.g.
// gcd(105, 77) = 7 after the steps 105,77 -> 28,77 -> 28,49 -> 28,21 ->
// 7,21 -> 7,14 -> 7,7 -> 7,0.
//
// Block-level handshake as HLS generates it: ap_idle is high while the block
// waits; ap_start (held high by the caller) starts a run, ap_done and
// ap_ready pulse for one cycle when ap_return holds the result. One step of
// the loop takes one clock cycle.
//
// This design's choice: with Ain = 0 the loop as written would never end, so
// the block then returns Bin at once (the mathematically correct result).
module gcd #(
  parameter int WIDTH = 32
) (
  input  logic             ap_clk,
  input  logic             ap_rst,      // active high, as in HLS designs
  input  logic             ap_start,
  output logic             ap_done,
  output logic             ap_idle,
  output logic             ap_ready,
  input  logic [WIDTH-1:0] Ain,
  input  logic [WIDTH-1:0] Bin,
  output logic [WIDTH-1:0] ap_return
);

  typedef enum logic {IDLE, RUN} state_t;
  state_t           state;
  logic [WIDTH-1:0] a, b;

  assign ap_idle = (state == IDLE);

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      state     <= IDLE;
      a         <= '0;
      b         <= '0;
      ap_done   <= 1'b0;
      ap_ready  <= 1'b0;
      ap_return <= '0;
    end else begin
      ap_done  <= 1'b0;
      ap_ready <= 1'b0;
      unique case (state)
        IDLE: if (ap_start && !ap_done) begin
          a     <= Ain;
          b     <= (Ain == '0) ? '0 : Bin;
          if (Ain == '0) a <= Bin;
          state <= RUN;
        end
        RUN: begin
          if (b == '0) begin
            ap_return <= a;
            ap_done   <= 1'b1;
            ap_ready  <= 1'b1;
            state     <= IDLE;
          end else if (a > b) begin
            a <= a - b;
          end else begin
            b <= b - a;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
