// analog_loop_model: behavioural model (not synthesizable) of the analog
// side of the BIST loop, for simulation only: the system DAC, the device
// under test, the analog bypass switch MUX3 and the system ADC.
//
//   DAC  : holds the code for one clock (1 clock latency), ideal level.
//   DUT  : a one-pole low-pass with gain, plus noise:
//            y[k+1] = y[k] + lp_alpha * (gain * x[k] - y[k]) + noise[k],
//          i.e. H(z) = gain * lp_alpha * z^-1 / (1 - (1 - lp_alpha) z^-1);
//          lp_alpha = 1 gives a plain gain with one clock of delay. The
//          noise is Gaussian (sum of twelve uniform variates) with r.m.s.
//          value dut_noise LSB.
//   MUX3 : mux3_sel = MUX3_BYPASS routes the DAC output straight to the ADC.
//   ADC  : adds Gaussian noise of adc_noise LSB r.m.s., rounds, saturates to
//          the signed N-bit range, one clock latency.
// So the bypass path delays by two clocks and the DUT path by three.
// gain, lp_alpha, dut_noise and adc_noise are set by the testbench at run time.
module analog_loop_model
  import bist_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic                     clk,
  input  logic signed [DATA_W-1:0] dac_data,
  input  mux3_sel_e                mux3_sel,
  input  real                      gain,
  input  real                      lp_alpha,
  input  real                      dut_noise,
  input  real                      adc_noise,
  output logic signed [DATA_W-1:0] adc_data
);

  real dac_q = 0.0, dut_q = 0.0;

  function automatic real gauss();
    real acc;
    acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom) / 4294967296.0;
    return acc - 6.0;
  endfunction

  function automatic logic signed [DATA_W-1:0] quantize(real v);
    real r;
    r = $floor(v + 0.5);
    if (r >  real'((1 << (DATA_W-1)) - 1)) r =  real'((1 << (DATA_W-1)) - 1);
    if (r < -real'(1 << (DATA_W-1)))       r = -real'(1 << (DATA_W-1));
    return DATA_W'($rtoi(r));
  endfunction

  initial adc_data = '0;

  always @(posedge clk) begin
    dac_q    <= real'(dac_data);
    dut_q    <= dut_q + lp_alpha * (gain * dac_q - dut_q) + dut_noise * gauss();
    adc_data <= quantize(((mux3_sel == MUX3_BYPASS) ? dac_q : dut_q) + adc_noise * gauss());
  end

endmodule
