// tb_ora: feeds random analysed samples (on the ADC input or the digital
// loopback input, per MUX4) and random references, with a window of
// enabled cycles, and checks DC1 = sum f*ref1 and DC2 = sum f*ref2 kept
// here. Also checks that the input MUX4 does not select is ignored.
module tb_ora;
  import bist_pkg::*;
  localparam int unsigned D_W = 8, C_W = 16, A_W = 2*D_W + C_W;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  mux4_sel_e mux4_sel;
  logic signed [D_W-1:0] adc_data, loop_data, ref1, ref2;
  logic signed [A_W-1:0] dc1, dc2;
  int checks = 0, failures = 0;

  ora #(.DATA_W(D_W), .CNT_W(C_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic measure(input mux4_sel_e m, input int k_len, input int pre);
    longint e1, e2;
    mux4_sel = m; clr = 1; en = 0;
    @(negedge clk); clr = 0;
    e1 = 0; e2 = 0;
    for (int i = 0; i < pre + k_len + 5; i++) begin
      adc_data = D_W'($urandom); loop_data = D_W'($urandom);
      ref1 = D_W'($urandom); ref2 = D_W'($urandom);
      en = (i >= pre) && (i < pre + k_len);
      if (en) begin
        e1 += longint'(m == MUX4_DIGITAL ? loop_data : adc_data) * longint'(ref1);
        e2 += longint'(m == MUX4_DIGITAL ? loop_data : adc_data) * longint'(ref2);
      end
      @(negedge clk);
    end
    checks += 2;
    if (longint'(dc1) != e1) begin failures++; $display("dc1 %0d exp %0d", dc1, e1); end
    if (longint'(dc2) != e2) begin failures++; $display("dc2 %0d exp %0d", dc2, e2); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adc_data = 0; loop_data = 0; ref1 = 0; ref2 = 0; mux4_sel = MUX4_ADC;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++)
      measure((t % 2) ? MUX4_DIGITAL : MUX4_ADC, $urandom_range(1, 2000), $urandom_range(0, 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
