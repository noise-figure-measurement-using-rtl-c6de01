// bist_top: digital core of the mixed-signal BIST for noise-figure,
// linearity and frequency-response measurements.
//
// A DDS test pattern generator (three NCOs) drives the system DAC; the
// response of the analog device under test (or of the bypass path) comes
// back through the system ADC and is analysed by a multiply/accumulate
// response analyzer that correlates it with an in-phase and a quadrature
// reference tone. The test controller sweeps the reference frequency and
// reports, per frequency point, the two correlation sums DC1 and DC2, from
// which amplitude, phase, noise floor, SNR and noise figure are computed.
// The DAC, the ADC, the device under test and the analog bypass switch
// (MUX3) lie outside this module: dac_data and mux3_sel leave it, adc_data
// enters it.
//
// Interface: load a setup record on `cfg` and pulse `start`; one
// result_valid pulse per sweep point carries point_idx, dc1, dc2 and the
// f2 word of the point; `done` marks the last. Timing per point:
// K + settle + 5 clocks (see test_controller).
//
// Default sizes: N = 8 data bits (the 8-bit converter of the reference
// hardware); n = 16 phase bits, p = 10 table address bits and M = 16
// (K < 65536) are this design's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned PHASE_W = 16,  // n
  parameter int unsigned ADDR_W  = 10,  // p
  parameter int unsigned DATA_W  = 8,   // N
  parameter int unsigned CNT_W   = 16,  // M
  localparam int unsigned ACC_W  = 2*DATA_W + CNT_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  bist_cfg_t                 cfg,
  // converter side
  output logic signed [DATA_W-1:0]  dac_data,
  output mux3_sel_e                 mux3_sel,
  input  logic signed [DATA_W-1:0]  adc_data,
  // results
  output logic                      busy,
  output logic                      result_valid,
  output logic [15:0]               point_idx,
  output logic [PHASE_W-1:0]        point_f2,
  output logic signed [ACC_W-1:0]   dc1,
  output logic signed [ACC_W-1:0]   dc2,
  output logic                      done
);

  logic               nco_load, ora_clr, ora_en;
  logic [PHASE_W-1:0] f1, f2, f3, theta1, theta2, theta3;
  mux1_sel_e          mux1_sel;
  mux2_sel_e          mux2_sel;
  mux4_sel_e          mux4_sel;
  logic signed [DATA_W-1:0] ref1, ref2;

  test_controller #(.PHASE_W(PHASE_W), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .cfg,
    .nco_load, .f1, .f2, .f3, .theta1, .theta2, .theta3,
    .mux1_sel, .mux2_sel, .mux3_sel, .mux4_sel,
    .ora_clr, .ora_en,
    .busy, .result_valid, .point_idx, .done
  );

  tpg #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_tpg (
    .clk, .rst_n, .load(nco_load),
    .f1, .f2, .f3, .theta1, .theta2, .theta3,
    .mux1_sel, .mux2_sel,
    .dac_data, .ref1, .ref2
  );

  ora #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_ora (
    .clk, .rst_n, .clr(ora_clr), .en(ora_en), .mux4_sel,
    .adc_data, .loop_data(dac_data), .ref1, .ref2,
    .dc1, .dc2
  );

  assign point_f2 = f2;

endmodule
