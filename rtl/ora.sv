// ora: multiplier/accumulator-based output response analyzer.
//
// MUX4 selects the signal to analyse, f(nT): the response returned through
// the ADC, or the generator's MUX1 output directly (digital loopback, used to
// check the BIST logic itself). Two MACs multiply f(nT) by the references
// f1(nT) and f2(nT) and accumulate over the K enabled cycles:
//   DC1 = sum f(nT) * f1(nT),   DC2 = sum f(nT) * f2(nT).
// With f1 a cosine and f2 a sine at frequency w, sqrt(DC1^2 + DC2^2) is the
// amplitude of f at w and -atan(DC2/DC1) its phase; that arithmetic is left
// to whoever reads DC1/DC2. This structure follows the architecture's block
// diagram.
//
// Timing: as for `mac`: clr empties both accumulators; a sample presented
// with en=1 in cycle c is included in dc1/dc2 from cycle c+2.
module ora
  import bist_pkg::*;
#(
  parameter int unsigned DATA_W = 8,    // N
  parameter int unsigned CNT_W  = 16,   // M
  localparam int unsigned ACC_W = 2*DATA_W + CNT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  mux4_sel_e                mux4_sel,
  input  logic signed [DATA_W-1:0] adc_data,
  input  logic signed [DATA_W-1:0] loop_data,   // MUX1 output of the TPG
  input  logic signed [DATA_W-1:0] ref1,        // f1(nT)
  input  logic signed [DATA_W-1:0] ref2,        // f2(nT)
  output logic signed [ACC_W-1:0]  dc1,
  output logic signed [ACC_W-1:0]  dc2
);

  logic signed [DATA_W-1:0] f_sample;

  always_comb f_sample = (mux4_sel == MUX4_DIGITAL) ? loop_data : adc_data;

  mac #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_mac1 (
    .clk, .rst_n, .clr, .en, .a(f_sample), .b(ref1), .acc(dc1));
  mac #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_mac2 (
    .clk, .rst_n, .clr, .en, .a(f_sample), .b(ref2), .acc(dc2));

endmodule
