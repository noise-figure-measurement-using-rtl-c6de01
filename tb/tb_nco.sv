// tb_nco: runs the NCO with several frequency/initial-phase pairs and checks
// each output sample against 127*sin(2*pi*trunc(k*f+theta)/1024) computed
// here, including the two-clock latency after a restart. Also checks Eq. (1):
// with f = 2^n/16 the output repeats every 16 clocks.
module tb_nco;
  localparam int unsigned N_W = 16, P_W = 10, D_W = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N_W-1:0] freq, theta;
  logic signed [D_W-1:0] sample;
  int checks = 0, failures = 0;

  nco #(.PHASE_W(N_W), .ADDR_W(P_W), .DATA_W(D_W)) dut (.clk, .rst_n, .load, .freq, .theta, .sample);

  always #5 clk = ~clk;

  function automatic int ref_sample(int unsigned k, logic [N_W-1:0] f, logic [N_W-1:0] th);
    logic [N_W-1:0] ph;
    int unsigned a;
    real x;
    ph = N_W'(k * f + th);
    a = int'(ph) >> (N_W - P_W);
    x = 127.0 * $sin(2.0 * 3.141592653589793 * a / (1 << P_W));
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  task automatic run(input logic [N_W-1:0] f, input logic [N_W-1:0] th, input int unsigned len);
    int d;
    freq = f; theta = th; load = 1;
    @(negedge clk);            // restart edge
    load = 0;
    // the accumulator now holds 0; sample k appears one clock after it holds k*f
    @(negedge clk);
    for (int unsigned k = 0; k < len; k++) begin
      d = int'(sample) - ref_sample(k, f, th);
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        if (failures < 10) $display("f=%h th=%h k=%0d got %0d exp %0d", f, th, k, sample, ref_sample(k, f, th));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [D_W-1:0] first [16];
    freq = '0; theta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16'd320, 16'd0, 300);
    run(16'd320, 16'h4000, 300);     // cosine: quarter-turn initial phase
    run(16'd1001, 16'h1234, 300);
    run(16'd40000, 16'h0, 200);
    for (int i = 0; i < 5; i++) run(N_W'($urandom), N_W'($urandom), 100);
    // period check, f = 2^16/16
    freq = 16'h1000; theta = 0; load = 1;
    @(negedge clk); load = 0; @(negedge clk);
    for (int k = 0; k < 16; k++) begin first[k] = sample; @(negedge clk); end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (sample != first[k]) failures++;
      @(negedge clk);
    end
    checks++;
    if (first[4] != 127 || first[12] != -127) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
