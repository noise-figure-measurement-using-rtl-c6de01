// mac: one multiplier/accumulator pair of the output response analyzer
// (Mult1/Accum1 or Mult2/Accum2).
//
// Each clock the N x N-bit signed product a*b is registered; one clock later
// it is added into the accumulator if `en` was high with it. Over K enabled
// cycles the accumulator therefore holds sum(a[n]*b[n]), one DC term of the
// analyzer (DC1 = sum f(nT)cos, DC2 = sum f(nT)sin).
//
// Width: the accumulator has ACC_W = 2N + M bits, where K < 2^M is the
// longest accumulation, so it cannot overflow. The architecture calls the
// accumulator "M-bit" with K < 2^M; this design reads M as the growth
// allowance on top of the 2N-bit product.
//
// Timing: `clr` empties the accumulator and the product pipeline on the next
// edge. A sample presented with en=1 in cycle c is in `acc` from cycle c+2.
module mac #(
  parameter int unsigned DATA_W = 8,    // N
  parameter int unsigned CNT_W  = 16,   // M
  localparam int unsigned ACC_W = 2*DATA_W + CNT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [2*DATA_W-1:0] prod_q;
  logic                       en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      en_q   <= 1'b0;
      acc    <= '0;
    end else if (clr) begin
      prod_q <= '0;
      en_q   <= 1'b0;
      acc    <= '0;
    end else begin
      prod_q <= a * b;
      en_q   <= en;
      if (en_q) acc <= acc + ACC_W'(prod_q);
    end
  end

endmodule
