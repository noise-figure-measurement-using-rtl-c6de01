// tb_phase_accumulator: checks the phase accumulator against an integer
// model. Random frequency and initial-phase words, restarts with `load` at
// random times and a word change mid-run; after every clock the output must
// equal (k*f + theta) mod 2^n, k counted from the last restart.
module tb_phase_accumulator;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] freq, theta, phase;
  int checks = 0, failures = 0;
  logic [W-1:0] model_acc;

  phase_accumulator #(.PHASE_W(W)) dut (.clk, .rst_n, .load, .freq, .theta, .phase);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    freq = 16'h0123; theta = 16'h4000;
    model_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 2000; i++) begin
      if (phase !== W'(model_acc + theta)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %h exp %h", i, phase, W'(model_acc + theta));
      end
      checks++;
      // choose next inputs and advance the model by one clock
      load = ($urandom_range(0, 99) == 0);
      if ($urandom_range(0, 199) == 0) freq = W'($urandom);
      if ($urandom_range(0, 199) == 0) theta = W'($urandom);
      model_acc = load ? '0 : W'(model_acc + freq);
      @(negedge clk);
    end
    // wrap check: f = 2^(n-2) returns to theta every 4 clocks
    load = 1; freq = 16'h4000; theta = 16'h0011;
    @(negedge clk); load = 0;
    for (int k = 0; k < 8; k++) begin
      if (phase !== W'(k * 16'h4000 + 16'h0011)) failures++;
      checks++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
