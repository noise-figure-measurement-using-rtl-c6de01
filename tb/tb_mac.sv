// tb_mac: drives random signed operand pairs with a random enable pattern
// and checks the accumulator against a running sum kept here, including the
// two-clock latency, clear, the extreme operands and a long accumulation
// that would overflow a 2N-bit register.
module tb_mac;
  localparam int unsigned D_W = 8, C_W = 16, A_W = 2*D_W + C_W;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [D_W-1:0] a, b;
  logic signed [A_W-1:0] acc;
  longint model [$];          // running sums; acc shows the one of the previous input cycle
  longint sum;
  int checks = 0, failures = 0;

  mac #(.DATA_W(D_W), .CNT_W(C_W)) dut (.clk, .rst_n, .clr, .en, .a, .b, .acc);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic signed [D_W-1:0] x, input logic signed [D_W-1:0] y);
    en = e; a = x; b = y;
    @(negedge clk);
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear, then random pattern; check acc two clocks after each input
    clr = 1; @(negedge clk); clr = 0;
    sum = 0;
    for (int i = 0; i < 3000; i++) begin
      logic e; logic signed [D_W-1:0] x, y;
      e = ($urandom_range(0, 3) != 0);
      x = D_W'($urandom); y = D_W'($urandom);
      if (i == 10) begin x = -128; y = -128; e = 1; end
      step(e, x, y);
      if (e) sum += longint'(x) * longint'(y);
      model.push_back(sum);
      if (model.size() > 1) begin
        longint expv;
        expv = model.pop_front();
        checks++;
        if (longint'(acc) != expv) begin
          failures++;
          if (failures < 10) $display("i=%0d acc %0d exp %0d", i, acc, expv);
        end
      end
    end
    // clear empties it
    clr = 1; en = 0; @(negedge clk); clr = 0; @(negedge clk);
    checks++; if (acc != 0) failures++;
    // long accumulation: 60000 x (127*127) exceeds 2^29
    for (int i = 0; i < 60000; i++) step(1'b1, 8'sd127, 8'sd127);
    en = 0; repeat (2) @(negedge clk);
    checks++;
    if (longint'(acc) != 60000 * 127 * 127) begin
      failures++; $display("long sum %0d", acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
