// tb_test_controller: runs sweeps with several K / settle / point counts and
// checks, cycle by cycle, the controller's sequence: one restart (nco_load
// with ora_clr) per point, accumulation starting settle + 3 clocks after the
// restart and lasting exactly K clocks, result_valid one clock after the
// drain clock (K + settle + 5 clocks per point), the frequency words
// start + i*step for point i, the mux selects of the setup record, `done`
// with the last point only, and a `start` during a sweep being ignored.
module tb_test_controller;
  import bist_pkg::*;
  localparam int unsigned N_W = 16, C_W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  bist_cfg_t cfg;
  logic nco_load, ora_clr, ora_en, busy, result_valid, done;
  logic [N_W-1:0] f1, f2, f3, theta1, theta2, theta3;
  mux1_sel_e mux1_sel; mux2_sel_e mux2_sel; mux3_sel_e mux3_sel; mux4_sel_e mux4_sel;
  logic [15:0] point_idx;
  int checks = 0, failures = 0;

  test_controller #(.PHASE_W(N_W), .CNT_W(C_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic sweep(input int k_len, input int settle, input int npts, input bit poke_start);
    int cyc, t_load, en_cnt, points, dones;
    cfg.k_len = 32'(k_len); cfg.settle = 16'(settle); cfg.n_points = 16'(npts);
    cfg.mux1 = mux1_sel_e'($urandom_range(0, 1)); cfg.mux2 = mux2_sel_e'($urandom_range(0, 1));
    cfg.mux3 = mux3_sel_e'($urandom_range(0, 1)); cfg.mux4 = mux4_sel_e'($urandom_range(0, 1));
    cfg.f1_start = $urandom; cfg.f1_step = $urandom; cfg.theta1 = $urandom;
    cfg.f2_start = $urandom; cfg.f2_step = $urandom; cfg.theta2 = $urandom;
    cfg.f3_start = $urandom; cfg.f3_step = $urandom; cfg.theta3 = $urandom;
    start = 1; @(negedge clk); start = 0;
    cyc = 0; t_load = -1; en_cnt = 0; points = 0; dones = 0;
    while (busy && cyc < 1000000) begin
      if (poke_start && cyc == 7) begin
        start = 1; cfg.n_points = 16'd99;      // must be ignored
      end else start = 0;
      chk(ora_clr == nco_load, "clr with load");
      chk(!(ora_en && nco_load), "en during load");
      chk(mux1_sel == cfg.mux1 && mux2_sel == cfg.mux2 && mux3_sel == cfg.mux3 && mux4_sel == cfg.mux4 || poke_start, "mux selects");
      if (nco_load) begin
        chk(t_load < 0, "load while point open");
        t_load = cyc; en_cnt = 0;
        chk(f1 == N_W'(cfg.f1_start + points * cfg.f1_step), "f1 word");
        chk(f2 == N_W'(cfg.f2_start + points * cfg.f2_step), "f2 word");
        chk(f3 == N_W'(cfg.f3_start + points * cfg.f3_step), "f3 word");
        chk(theta1 == N_W'(cfg.theta1) && theta2 == N_W'(cfg.theta2) && theta3 == N_W'(cfg.theta3), "theta words");
      end
      if (ora_en) begin
        if (en_cnt == 0) chk(cyc - t_load == settle + 3, "accumulation start");
        en_cnt++;
      end
      if (result_valid) begin
        chk(cyc - t_load == k_len + settle + 4, "point length");
        chk(en_cnt == k_len, "K samples");
        chk(point_idx == 16'(points), "point index");
        points++;
        t_load = -1;
      end
      if (done) begin
        dones++;
        chk(result_valid && points == npts, "done on last point");
      end
      @(negedge clk);
      cyc++;
    end
    start = 0;
    chk(points == npts, "number of points");
    chk(dones == 1, "one done");
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !result_valid, "idle after reset");
    sweep(1, 0, 1, 0);
    sweep(16, 3, 4, 0);
    sweep(100, 20, 3, 1);
    sweep(4096, 10, 5, 0);
    for (int i = 0; i < 5; i++) sweep($urandom_range(1, 300), $urandom_range(0, 40), $urandom_range(1, 6), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
