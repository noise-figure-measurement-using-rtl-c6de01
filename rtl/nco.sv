// nco: numerically controlled oscillator of the test pattern generator.
//
// Phase accumulator -> phase truncation -> sine LUT, as in the NCO block
// diagram. The accumulator (n bits) adds the frequency word f every clock,
// the initial phase word theta offsets it, and phase truncation keeps only
// the top p bits, which address a 2^p-entry sine table of N-bit samples. The
// truncation is a plain bit selection (no rounding), so it is written here
// rather than as a block of its own. The output frequency is f * f_clk / 2^n.
//
// Interface: `load` restarts the accumulator (see phase_accumulator); freq
// and theta are n-bit words. Timing: the sample for accumulator count k
// (phase k*f + theta) appears two clocks after the accumulator holds k, so
// after an edge with load=1 at cycle t0, the output in cycle t0+2+k is
//   TABLE[((k*f + theta) mod 2^n) >> (n-p)].
// Widths n and p are this design's choices; N = 8 matches the 8-bit data
// path of the reference hardware.
module nco #(
  parameter int unsigned PHASE_W = 16,  // n
  parameter int unsigned ADDR_W  = 10,  // p
  parameter int unsigned DATA_W  = 8    // N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [PHASE_W-1:0]       freq,
  input  logic [PHASE_W-1:0]       theta,
  output logic signed [DATA_W-1:0] sample
);

  logic [PHASE_W-1:0] phase;
  logic [ADDR_W-1:0]  addr;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_acc (
    .clk, .rst_n, .load, .freq, .theta, .phase
  );

  // Phase truncation: the p most significant phase bits address the table.
  assign addr = phase[PHASE_W-1 -: ADDR_W];

  sine_lut #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_lut (
    .clk, .addr, .sample
  );

endmodule
