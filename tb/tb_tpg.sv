// tb_tpg: checks the pattern generator's three outputs in every MUX1/MUX2
// setting against reference sine samples computed here: dac_data is NCO1 or
// (NCO1+NCO2)>>>1, ref1 is NCO1 or NCO2, ref2 is NCO3, all with a latency of
// three clocks from the restart edge. Also checks that NCO2 and NCO3 with
// initial phases a quarter turn apart give a cosine/sine pair.
module tb_tpg;
  import bist_pkg::*;
  localparam int unsigned N_W = 16, P_W = 10, D_W = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N_W-1:0] f1, f2, f3, theta1, theta2, theta3;
  mux1_sel_e mux1_sel;
  mux2_sel_e mux2_sel;
  logic signed [D_W-1:0] dac_data, ref1, ref2;
  int checks = 0, failures = 0;
  int n_two_tone = 0, n_mux2_nco2 = 0;

  tpg #(.PHASE_W(N_W), .ADDR_W(P_W), .DATA_W(D_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int s(int unsigned k, logic [N_W-1:0] f, logic [N_W-1:0] th);
    logic [N_W-1:0] ph;
    real x;
    ph = N_W'(k * f + th);
    x = 127.0 * $sin(2.0 * 3.141592653589793 * real'(int'(ph) >> (N_W - P_W)) / (1 << P_W));
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  function automatic bit near(int got, int expv, int tol);
    return (got - expv <= tol) && (expv - got <= tol);
  endfunction

  task automatic run(input mux1_sel_e m1, input mux2_sel_e m2, input int unsigned len);
    int e_dac, e_r1, e_r2;
    mux1_sel = m1; mux2_sel = m2; load = 1;
    @(negedge clk); load = 0;
    repeat (2) @(negedge clk);
    for (int unsigned k = 0; k < len; k++) begin
      e_dac = (m1 == MUX1_TWO_TONE) ? ((s(k, f1, theta1) + s(k, f2, theta2)) >>> 1) : s(k, f1, theta1);
      e_r1  = (m2 == MUX2_NCO2) ? s(k, f2, theta2) : s(k, f1, theta1);
      e_r2  = s(k, f3, theta3);
      checks += 3;
      if (!near(dac_data, e_dac, 1)) begin failures++; if (failures < 10) $display("dac k=%0d %0d vs %0d", k, dac_data, e_dac); end
      if (!near(ref1, e_r1, 1)) begin failures++; if (failures < 10) $display("ref1 k=%0d %0d vs %0d", k, ref1, e_r1); end
      if (!near(ref2, e_r2, 1)) begin failures++; if (failures < 10) $display("ref2 k=%0d %0d vs %0d", k, ref2, e_r2); end
      @(negedge clk);
    end
    if (m1 == MUX1_TWO_TONE) n_two_tone++;
    if (m2 == MUX2_NCO2) n_mux2_nco2++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c_sum, s_sum;
    f1 = 16'd320; f2 = 16'd480; f3 = 16'd480;
    theta1 = 0; theta2 = 16'h4000; theta3 = 16'h0000;
    mux1_sel = MUX1_SINGLE; mux2_sel = MUX2_NCO1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(MUX1_SINGLE,   MUX2_NCO1, 400);
    run(MUX1_SINGLE,   MUX2_NCO2, 400);
    run(MUX1_TWO_TONE, MUX2_NCO1, 400);
    run(MUX1_TWO_TONE, MUX2_NCO2, 400);
    f1 = 16'd777; f2 = 16'd5000; f3 = 16'd123; theta1 = 16'h1111; theta3 = 16'h2222;
    run(MUX1_TWO_TONE, MUX2_NCO2, 400);
    // quadrature: sum of ref1*ref2 over whole periods is ~0
    f2 = 16'd512; f3 = 16'd512; theta2 = 16'h4000; theta3 = 0;
    mux2_sel = MUX2_NCO2; load = 1; @(negedge clk); load = 0; repeat (2) @(negedge clk);
    c_sum = 0; s_sum = 0;
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk);
      c_sum += real'(ref1) * real'(ref2);
      s_sum += real'(ref1) * real'(ref1);
    end
    checks++;
    if (c_sum > 0.01 * s_sum || c_sum < -0.01 * s_sum) begin failures++; $display("not quadrature %f %f", c_sum, s_sum); end
    checks++;
    if (n_two_tone == 0 || n_mux2_nco2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
