// tpg: DDS-based test pattern generator.
//
// Three NCOs with their own frequency and initial-phase words. NCO1 is the
// stimulus; NCO1 plus NCO2 forms a two-tone stimulus for linearity (IP3)
// tests. MUX1 chooses which of the two drives the DAC (and the ORA's digital
// loopback input). MUX2 chooses NCO1 or NCO2 as the ORA's first reference
// f1(nT); NCO3 is always the second reference f2(nT). For a noise-figure
// sweep NCO2 and NCO3 run at the same, swept frequency with initial phases a
// quarter turn apart (in-phase and quadrature references) while NCO1 holds
// the stimulus tone. This structure follows the architecture's block diagram.
//
// Design choices: the two-tone sum is halved, (s1 + s2) >>> 1, so that it
// stays within the N-bit DAC word; all three outputs are registered so that
// they are mutually aligned. All NCOs restart together on `load`.
//
// Timing: after an edge with load=1 at cycle t0, the outputs in cycle
// t0 + TPG_LATENCY + k carry sample k of each NCO (TPG_LATENCY = 3).
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned PHASE_W = 16,  // n
  parameter int unsigned ADDR_W  = 10,  // p
  parameter int unsigned DATA_W  = 8    // N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [PHASE_W-1:0]       f1, f2, f3,
  input  logic [PHASE_W-1:0]       theta1, theta2, theta3,
  input  mux1_sel_e                mux1_sel,
  input  mux2_sel_e                mux2_sel,
  output logic signed [DATA_W-1:0] dac_data,   // MUX1 output
  output logic signed [DATA_W-1:0] ref1,       // f1(nT), MUX2 output
  output logic signed [DATA_W-1:0] ref2        // f2(nT), NCO3
);

  logic signed [DATA_W-1:0] s1, s2, s3;
  logic signed [DATA_W:0]   sum;
  logic signed [DATA_W-1:0] two_tone;

  nco #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_nco1 (
    .clk, .rst_n, .load, .freq(f1), .theta(theta1), .sample(s1));
  nco #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_nco2 (
    .clk, .rst_n, .load, .freq(f2), .theta(theta2), .sample(s2));
  nco #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_nco3 (
    .clk, .rst_n, .load, .freq(f3), .theta(theta3), .sample(s3));

  always_comb begin
    sum      = (DATA_W+1)'(s1) + (DATA_W+1)'(s2);
    two_tone = DATA_W'(sum >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_data <= '0;
      ref1     <= '0;
      ref2     <= '0;
    end else begin
      dac_data <= (mux1_sel == MUX1_TWO_TONE) ? two_tone : s1;
      ref1     <= (mux2_sel == MUX2_NCO2) ? s2 : s1;
      ref2     <= s3;
    end
  end

endmodule
