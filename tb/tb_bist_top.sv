// tb_bist_top: end-to-end test of the BIST core at its default sizes, with
// the behavioural analog loop (DAC, DUT, MUX3, ADC) around it.
//
//  1. Digital loopback (MUX4), single tone and two-tone (MUX1), reference
//     from NCO2 and from NCO1 (MUX2): DC1/DC2 of every sweep point must equal
//     the correlation sums computed here from the sine-table formula, and a
//     point must take K + settle + 5 clocks.
//  2. Noise-figure measurement: stimulus tone on bin 40 of a K = 4096 record,
//     in-phase/quadrature references swept over bins 1..79. The sweep runs
//     once with the DUT bypassed (MUX3) and once through the DUT; the signal
//     bin gives the signal power, the other bins the noise floor, and
//     NF = SNR_in / SNR_out. A noiseless unity-gain DUT must give NF ~ 0 dB (within 2.5 dB);
//     a DUT with gain 0.9 and 3 LSB r.m.s. of added noise, behind 1 LSB of
//     ADC noise, must give the NF predicted here (about 10.6 dB); a DUT with
//     gain 0.5 and 2.7 LSB of noise must give about 15 dB.
//  3. Phase calibration: the phase at the signal bin through the DUT minus
//     the phase with the DUT bypassed must equal the DUT's one-clock delay.
//  4. Frequency response: the DUT becomes a one-pole low-pass; the stimulus
//     (NCO1) and the quadrature reference (NCO3) are swept together, with
//     NCO1 itself as the in-phase reference (MUX2). Gain and phase through
//     the DUT, calibrated by the same sweep with the DUT bypassed, must match
//     the filter's transfer function.
// Each mechanism used (sweep, digital loopback, ADC path, two-tone, both
// MUX2 settings, DUT bypass, DUT path) is counted and must occur.
module tb_bist_top;
  import bist_pkg::*;
  localparam int unsigned N_W = 16, P_W = 10, D_W = 8, C_W = 16, A_W = 2*D_W + C_W;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0, start = 0;
  bist_cfg_t cfg;
  logic signed [D_W-1:0] dac_data, adc_data;
  mux3_sel_e mux3_sel;
  logic busy, result_valid, done;
  logic [15:0] point_idx;
  logic [N_W-1:0] point_f2;
  logic signed [A_W-1:0] dc1, dc2;
  real gain = 1.0, lp_alpha = 1.0, dut_noise = 0.0, adc_noise = 0.0;

  int checks = 0, failures = 0;
  int n_points = 0, n_digital = 0, n_adc = 0, n_two_tone = 0, n_ref_nco1 = 0,
      n_ref_nco2 = 0, n_bypass = 0, n_dut = 0, n_fr_points = 0;

  // one sweep's results
  longint res_dc1 [$], res_dc2 [$];

  bist_top dut (.*);
  analog_loop_model #(.DATA_W(D_W)) u_analog (.clk, .dac_data, .mux3_sel, .gain, .lp_alpha, .dut_noise, .adc_noise, .adc_data);

  always #5 clk = ~clk;

  function automatic int tab(logic [N_W-1:0] ph);
    return $rtoi($floor(127.0 * $sin(2.0 * PI * real'(int'(ph) >> (N_W - P_W)) / real'(1 << P_W)) + 0.5));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_sweep();
    int cyc, last;
    res_dc1.delete(); res_dc2.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0; last = 0;
    while (!done) begin
      if (result_valid) begin
        res_dc1.push_back(longint'(dc1));
        res_dc2.push_back(longint'(dc2));
        if (res_dc1.size() > 1)
          chk(cyc - last == int'(cfg.k_len) + int'(cfg.settle) + 5, "point length");
        last = cyc;
        n_points++;
        if (cfg.mux4 == MUX4_DIGITAL) n_digital++; else n_adc++;
        if (cfg.mux1 == MUX1_TWO_TONE) n_two_tone++;
        if (cfg.mux2 == MUX2_NCO1) n_ref_nco1++; else n_ref_nco2++;
        if (cfg.mux4 == MUX4_ADC && cfg.mux3 == MUX3_BYPASS) n_bypass++;
        if (cfg.mux4 == MUX4_ADC && cfg.mux3 == MUX3_DUT) n_dut++;
      end
      @(negedge clk);
      cyc++;
    end
    // the done cycle is also the last result
    res_dc1.push_back(longint'(dc1));
    res_dc2.push_back(longint'(dc2));
    n_points++;
    if (cfg.mux4 == MUX4_DIGITAL) n_digital++; else n_adc++;
    if (cfg.mux1 == MUX1_TWO_TONE) n_two_tone++;
    if (cfg.mux2 == MUX2_NCO1) n_ref_nco1++; else n_ref_nco2++;
    if (cfg.mux4 == MUX4_ADC && cfg.mux3 == MUX3_BYPASS) n_bypass++;
    if (cfg.mux4 == MUX4_ADC && cfg.mux3 == MUX3_DUT) n_dut++;
    chk(res_dc1.size() == int'(cfg.n_points), "result count");
    @(negedge clk);
  endtask

  // digital loopback sweep with exact expected sums
  task automatic loopback_test(input mux1_sel_e m1, input mux2_sel_e m2);
    cfg = '0;
    cfg.mux1 = m1; cfg.mux2 = m2; cfg.mux3 = MUX3_BYPASS; cfg.mux4 = MUX4_DIGITAL;
    cfg.f1_start = 32'd777;  cfg.f1_step = 32'd13;   cfg.theta1 = 32'h0100;
    cfg.f2_start = 32'd1234; cfg.f2_step = 32'd211;  cfg.theta2 = 32'h4000;
    cfg.f3_start = 32'd1234; cfg.f3_step = 32'd211;  cfg.theta3 = 32'h0000;
    cfg.k_len = 32'd700; cfg.settle = 16'd5; cfg.n_points = 16'd4;
    run_sweep();
    for (int p = 0; p < int'(cfg.n_points); p++) begin
      longint e1, e2;
      logic [N_W-1:0] fa, fb, fc;
      fa = N_W'(cfg.f1_start + p * cfg.f1_step);
      fb = N_W'(cfg.f2_start + p * cfg.f2_step);
      fc = N_W'(cfg.f3_start + p * cfg.f3_step);
      e1 = 0; e2 = 0;
      for (int j = int'(cfg.settle); j < int'(cfg.settle) + int'(cfg.k_len); j++) begin
        int s1, s2, s3, x, r1;
        s1 = tab(N_W'(j * fa + cfg.theta1));
        s2 = tab(N_W'(j * fb + cfg.theta2));
        s3 = tab(N_W'(j * fc + cfg.theta3));
        x  = (m1 == MUX1_TWO_TONE) ? ((s1 + s2) >>> 1) : s1;
        r1 = (m2 == MUX2_NCO2) ? s2 : s1;
        e1 += longint'(x * r1);
        e2 += longint'(x * s3);
      end
      chk(res_dc1[p] == e1 && res_dc2[p] == e2,
          $sformatf("loopback m1=%0d m2=%0d point %0d: got %0d %0d exp %0d %0d", m1, m2, p, res_dc1[p], res_dc2[p], e1, e2));
    end
  endtask

  // NF sweep: returns signal power, mean noise power and signal phase
  task automatic nf_sweep(input mux3_sel_e m3, output real p_sig, output real p_noise, output real phase);
    int nb;
    cfg = '0;
    cfg.mux1 = MUX1_SINGLE; cfg.mux2 = MUX2_NCO2; cfg.mux3 = m3; cfg.mux4 = MUX4_ADC;
    cfg.f1_start = 32'd640;               // bin 40
    cfg.f2_start = 32'd16;  cfg.f2_step = 32'd16; cfg.theta2 = 32'h4000;   // cosine
    cfg.f3_start = 32'd16;  cfg.f3_step = 32'd16; cfg.theta3 = 32'h0000;   // sine
    cfg.k_len = 32'd4096; cfg.settle = 16'd8; cfg.n_points = 16'd79;       // bins 1..79
    run_sweep();
    p_sig = 0.0; p_noise = 0.0; nb = 0; phase = 0.0;
    for (int p = 0; p < int'(cfg.n_points); p++) begin
      real pw;
      pw = real'(res_dc1[p]) * real'(res_dc1[p]) + real'(res_dc2[p]) * real'(res_dc2[p]);
      if (p == 39) begin
        p_sig = pw;
        phase = $atan2(real'(res_dc1[p]), real'(res_dc2[p]));
      end else begin
        p_noise += pw; nb++;
      end
    end
    p_noise = p_noise / nb;
  endtask

  // frequency-response sweep: f1 = f3 on bins 20, 40, ..., 200; returns
  // per-point amplitude and phase of the response
  real fr_amp [$], fr_ph [$];
  task automatic fr_sweep(input mux3_sel_e m3);
    cfg = '0;
    cfg.mux1 = MUX1_SINGLE; cfg.mux2 = MUX2_NCO1; cfg.mux3 = m3; cfg.mux4 = MUX4_ADC;
    cfg.f1_start = 32'd320; cfg.f1_step = 32'd320; cfg.theta1 = 32'h0000;   // sine, in-phase reference
    cfg.f3_start = 32'd320; cfg.f3_step = 32'd320; cfg.theta3 = 32'h4000;   // cosine, quadrature reference
    cfg.k_len = 32'd4096; cfg.settle = 16'd64; cfg.n_points = 16'd10;
    run_sweep();
    fr_amp.delete(); fr_ph.delete();
    for (int p = 0; p < int'(cfg.n_points); p++) begin
      fr_amp.push_back($sqrt(real'(res_dc1[p]) * real'(res_dc1[p]) + real'(res_dc2[p]) * real'(res_dc2[p])));
      // response sin(wk + phi): DC1 ~ cos(phi) K/2 * 127, DC2 ~ sin(phi) K/2 * 127
      fr_ph.push_back($atan2(real'(res_dc2[p]), real'(res_dc1[p])));
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ps_in, pn_in, ph_in, ps_out, pn_out, ph_out, nf_db, nf_exp, amp, dphi, dphi_exp;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    loopback_test(MUX1_SINGLE,   MUX2_NCO2);
    loopback_test(MUX1_TWO_TONE, MUX2_NCO1);
    loopback_test(MUX1_TWO_TONE, MUX2_NCO2);

    // noiseless unity-gain DUT: NF ~ 0 dB
    gain = 1.0; dut_noise = 0.0; adc_noise = 1.0;
    nf_sweep(MUX3_BYPASS, ps_in, pn_in, ph_in);
    nf_sweep(MUX3_DUT, ps_out, pn_out, ph_out);
    nf_db = 10.0 * $log10((ps_in / pn_in) / (ps_out / pn_out));
    $display("noiseless DUT: SNR_in %0.1f dB, SNR_out %0.1f dB, NF %0.2f dB",
             10.0 * $log10(ps_in / pn_in), 10.0 * $log10(ps_out / pn_out), nf_db);
    // 78 noise bins give each noise-floor estimate a spread of about 0.5 dB
    chk(nf_db > -2.5 && nf_db < 2.5, "NF of a noiseless DUT");
    // amplitude of the signal bin: 127 * 127 * K / 2
    amp = $sqrt(ps_in);
    chk(amp > 0.95 * 127.0 * 127.0 * 2048.0 && amp < 1.05 * 127.0 * 127.0 * 2048.0, "signal amplitude");
    dphi = ph_out - ph_in;
    dphi_exp = -2.0 * PI * 640.0 / 65536.0;     // one clock of DUT delay at f1
    $display("phase through DUT minus bypass: %0.4f rad (expected %0.4f)", dphi, dphi_exp);
    chk(dphi - dphi_exp < 0.01 && dphi_exp - dphi < 0.01, "DUT phase delay");

    // noisy DUT
    gain = 0.9; dut_noise = 3.0; adc_noise = 1.0;
    nf_sweep(MUX3_BYPASS, ps_in, pn_in, ph_in);
    nf_sweep(MUX3_DUT, ps_out, pn_out, ph_out);
    nf_db = 10.0 * $log10((ps_in / pn_in) / (ps_out / pn_out));
    nf_exp = 10.0 * $log10((1.0 + 1.0/12.0 + 9.0) / (1.0 + 1.0/12.0) / 0.81);
    $display("noisy DUT: SNR_in %0.1f dB, SNR_out %0.1f dB, NF %0.2f dB (model %0.2f dB)",
             10.0 * $log10(ps_in / pn_in), 10.0 * $log10(ps_out / pn_out), nf_db, nf_exp);
    chk(nf_db > nf_exp - 2.5 && nf_db < nf_exp + 2.5, "NF of a noisy DUT");

    // a DUT with a 15 dB noise figure, the size of NF the reference op-amp showed:
    // gain 0.5 and 2.735 LSB of added noise behind 1 LSB of ADC noise
    gain = 0.5; dut_noise = 2.735; adc_noise = 1.0;
    nf_sweep(MUX3_BYPASS, ps_in, pn_in, ph_in);
    nf_sweep(MUX3_DUT, ps_out, pn_out, ph_out);
    nf_db = 10.0 * $log10((ps_in / pn_in) / (ps_out / pn_out));
    nf_exp = 10.0 * $log10((1.0 + 1.0/12.0 + 2.735 * 2.735) / (1.0 + 1.0/12.0) / 0.25);
    $display("15 dB DUT: SNR_in %0.1f dB, SNR_out %0.1f dB, NF %0.2f dB (model %0.2f dB)",
             10.0 * $log10(ps_in / pn_in), 10.0 * $log10(ps_out / pn_out), nf_db, nf_exp);
    chk(nf_db > nf_exp - 2.5 && nf_db < nf_exp + 2.5, "NF of a 15 dB DUT");

    // frequency response of a one-pole low-pass, calibrated by the bypass path
    begin
      real a_byp [$], p_byp [$];
      real alpha, w, re, im, h_mag, h_ph, g_meas, ph_meas, d;
      alpha = 0.25;
      gain = 1.0; lp_alpha = alpha; dut_noise = 0.0; adc_noise = 0.5;
      fr_sweep(MUX3_BYPASS);
      a_byp = fr_amp; p_byp = fr_ph;
      fr_sweep(MUX3_DUT);
      for (int p = 0; p < 10; p++) begin
        w  = 2.0 * PI * real'(320 * (p + 1)) / 65536.0;
        // H = alpha e^-jw / (1 - (1-alpha) e^-jw)
        re = 1.0 - (1.0 - alpha) * $cos(w);
        im = (1.0 - alpha) * $sin(w);
        h_mag = alpha / $sqrt(re * re + im * im);
        h_ph  = -w - $atan2(im, re);
        g_meas  = fr_amp[p] / a_byp[p];
        ph_meas = fr_ph[p] - p_byp[p];
        d = ph_meas - h_ph;
        while (d >  PI) d -= 2.0 * PI;
        while (d < -PI) d += 2.0 * PI;
        if (p == 0 || p == 9)
          $display("frequency response bin %0d: gain %0.4f (model %0.4f), phase %0.4f rad (model %0.4f)",
                   20 * (p + 1), g_meas, h_mag, ph_meas, h_ph);
        chk(g_meas > 0.97 * h_mag && g_meas < 1.03 * h_mag, $sformatf("gain at point %0d", p));
        chk(d < 0.03 && d > -0.03, $sformatf("phase at point %0d", p));
        n_fr_points++;
      end
      lp_alpha = 1.0;
    end

    $display("mechanisms: points=%0d digital=%0d adc=%0d two_tone=%0d ref_nco1=%0d ref_nco2=%0d bypass=%0d dut=%0d freq_response=%0d",
             n_points, n_digital, n_adc, n_two_tone, n_ref_nco1, n_ref_nco2, n_bypass, n_dut, n_fr_points);
    chk(n_points > 0 && n_digital > 0 && n_adc > 0 && n_two_tone > 0 && n_ref_nco1 > 0
        && n_ref_nco2 > 0 && n_bypass > 0 && n_dut > 0 && n_fr_points > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
