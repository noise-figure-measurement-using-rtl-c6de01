// bist_pkg: types and constants shared by the mixed-signal BIST blocks.
//
// The BIST consists of a direct-digital-synthesis test pattern generator
// (three NCOs), a multiply/accumulate output response analyzer and a test
// controller. This package holds the mux select encodings, the measurement
// configuration record and the fixed pipeline latency of the pattern path.
// The mux names (MUX1..MUX4) follow the block diagram of the architecture;
// the encodings, the record layout and the latency are this design's own.
package bist_pkg;

  // MUX1: what drives the DAC (and the digital loopback path).
  typedef enum logic {
    MUX1_SINGLE   = 1'b0,   // NCO1 alone (single tone: NF, frequency response)
    MUX1_TWO_TONE = 1'b1    // (NCO1 + NCO2) / 2 (two tones: IP3 / linearity)
  } mux1_sel_e;

  // MUX2: which NCO is the ORA's first reference f1(nT).
  typedef enum logic {
    MUX2_NCO1 = 1'b0,
    MUX2_NCO2 = 1'b1
  } mux2_sel_e;

  // MUX3 (analog, outside the digital core): DUT path or DUT bypass.
  typedef enum logic {
    MUX3_DUT    = 1'b0,
    MUX3_BYPASS = 1'b1
  } mux3_sel_e;

  // MUX4: what the ORA analyses.
  typedef enum logic {
    MUX4_ADC     = 1'b0,    // response returned through the ADC
    MUX4_DIGITAL = 1'b1     // MUX1 output directly (digital loopback)
  } mux4_sel_e;

  // Cycles from the NCO phase-accumulator reload to the first sample at the
  // TPG outputs: phase register, LUT register, TPG output register.
  localparam int unsigned TPG_LATENCY = 3;

  // Test setup record. Frequency words of point i are start + i*step.
  typedef struct packed {
    mux1_sel_e    mux1;
    mux2_sel_e    mux2;
    mux3_sel_e    mux3;
    mux4_sel_e    mux4;
    logic [31:0]  f1_start, f1_step, theta1;
    logic [31:0]  f2_start, f2_step, theta2;
    logic [31:0]  f3_start, f3_step, theta3;
    logic [31:0]  k_len;     // K, samples accumulated per point (>= 1)
    logic [15:0]  settle;    // extra cycles before accumulation starts
    logic [15:0]  n_points;  // sweep points (>= 1)
  } bist_cfg_t;

endpackage
