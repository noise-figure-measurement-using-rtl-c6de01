// tb_sine_lut: reads every table entry through the registered port and
// compares it with round(127 * sin(2*pi*a/1024)) computed here, and checks
// the one-clock read latency and the quarter-wave symmetries.
module tb_sine_lut;
  localparam int unsigned P_W = 10, D_W = 8, DEPTH = 1 << P_W;
  logic clk = 0;
  logic [P_W-1:0] addr;
  logic signed [D_W-1:0] sample;
  logic signed [D_W-1:0] got [DEPTH];
  int checks = 0, failures = 0;

  sine_lut #(.ADDR_W(P_W), .DATA_W(D_W)) dut (.clk, .addr, .sample);

  always #5 clk = ~clk;

  function automatic int expected(int a);
    real x;
    x = 127.0 * $sin(2.0 * 3.141592653589793 * a / DEPTH);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      addr = P_W'(a);
      @(negedge clk);            // one clock of latency
      got[a] = sample;
      checks++;
      // allow one LSB where the rounding of an exact .5 may differ
      if ((int'(sample) - expected(a)) > 1 || (expected(a) - int'(sample)) > 1) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %0d exp %0d", a, sample, expected(a));
      end
    end
    // key points and symmetry
    checks += 4;
    if (got[0] != 0)               failures++;
    if (got[DEPTH/4] != 127)       failures++;
    if (got[DEPTH/2] != 0)         failures++;
    if (got[3*DEPTH/4] != -127)    failures++;
    for (int a = 1; a < DEPTH/2; a++) begin
      checks++;
      if ((int'(got[a]) + int'(got[a + DEPTH/2])) > 1 || (int'(got[a]) + int'(got[a + DEPTH/2])) < -1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
