// test_controller: sequences BIST measurements and frequency sweeps.
//
// A measurement is a sweep of n_points points. For point i the NCO frequency
// words are f_x = f_x_start + i * f_x_step (x = 1, 2, 3); the initial phase
// words and the mux selects stay as set up. Each point runs:
//   LOAD    1 cycle   restart all NCO phase accumulators, clear the ORA
//   SETTLE  settle + TPG_LATENCY - 1 cycles (pattern pipeline and the
//           analog path fill)
//   ACCUM   K cycles  ORA accumulates (en = 1)
//   DRAIN   1 cycle   last product reaches the accumulators
//   REPORT  1 cycle   result_valid = 1, DC1/DC2 of the point are valid
// so a point takes K + settle + 5 cycles and the first accumulated sample is
// sample number `settle` of each NCO. After the last point `done` pulses with
// REPORT. A noise-figure sweep keeps f1 fixed and steps f2 = f3 across the
// band; a frequency-response sweep steps f1 and the reference together. The
// MUX3 select (DUT or bypass) is driven out to the analog loopback switch, so
// the same sweep can be repeated with the DUT bypassed.
//
// The architecture gives the controller's function (sweeping w2, selecting
// MUX3) but not its sequence; the states, per-point stepping of all three
// words and the settle count are this design's choices. `start` is ignored
// while a measurement runs; the setup record is captured on `start`.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned PHASE_W = 16,  // n
  parameter int unsigned CNT_W   = 16   // M: K < 2^M
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  bist_cfg_t          cfg,
  // to the TPG
  output logic               nco_load,
  output logic [PHASE_W-1:0] f1, f2, f3,
  output logic [PHASE_W-1:0] theta1, theta2, theta3,
  output mux1_sel_e          mux1_sel,
  output mux2_sel_e          mux2_sel,
  // to the analog loopback switch
  output mux3_sel_e          mux3_sel,
  // to the ORA
  output mux4_sel_e          mux4_sel,
  output logic               ora_clr,
  output logic               ora_en,
  // status
  output logic               busy,
  output logic               result_valid,
  output logic [15:0]        point_idx,
  output logic               done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_SETTLE, S_ACCUM, S_DRAIN, S_REPORT
  } state_e;

  localparam int unsigned TMR_W = (CNT_W > 17) ? CNT_W : 17;

  state_e             state;
  bist_cfg_t          cfg_q;
  logic [TMR_W-1:0]   tmr;
  logic [15:0]        point;
  logic [PHASE_W-1:0] f1_q, f2_q, f3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cfg_q <= '0;
      tmr   <= '0;
      point <= '0;
      f1_q  <= '0;
      f2_q  <= '0;
      f3_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cfg_q <= cfg;
          f1_q  <= PHASE_W'(cfg.f1_start);
          f2_q  <= PHASE_W'(cfg.f2_start);
          f3_q  <= PHASE_W'(cfg.f3_start);
          point <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          tmr   <= TMR_W'(cfg_q.settle) + TMR_W'(TPG_LATENCY - 1);
          state <= S_SETTLE;
        end
        S_SETTLE: begin
          if (tmr <= 1) begin
            tmr   <= TMR_W'(cfg_q.k_len[CNT_W-1:0]);
            state <= S_ACCUM;
          end else begin
            tmr <= tmr - 1'b1;
          end
        end
        S_ACCUM: begin
          if (tmr <= 1) state <= S_DRAIN;
          else          tmr   <= tmr - 1'b1;
        end
        S_DRAIN: state <= S_REPORT;
        S_REPORT: begin
          if (point + 16'd1 >= cfg_q.n_points) begin
            state <= S_IDLE;
          end else begin
            point <= point + 16'd1;
            f1_q  <= f1_q + PHASE_W'(cfg_q.f1_step);
            f2_q  <= f2_q + PHASE_W'(cfg_q.f2_step);
            f3_q  <= f3_q + PHASE_W'(cfg_q.f3_step);
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    nco_load     = (state == S_LOAD);
    ora_clr      = (state == S_LOAD);
    ora_en       = (state == S_ACCUM);
    busy         = (state != S_IDLE);
    result_valid = (state == S_REPORT);
    done         = (state == S_REPORT) && (point + 16'd1 >= cfg_q.n_points);
    point_idx    = point;
    f1           = f1_q;
    f2           = f2_q;
    f3           = f3_q;
    theta1       = PHASE_W'(cfg_q.theta1);
    theta2       = PHASE_W'(cfg_q.theta2);
    theta3       = PHASE_W'(cfg_q.theta3);
    mux1_sel     = cfg_q.mux1;
    mux2_sel     = cfg_q.mux2;
    mux3_sel     = cfg_q.mux3;
    mux4_sel     = cfg_q.mux4;
  end

  // A measurement must ask for K < 2^M samples per point.
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start)
      assert (cfg.k_len < 32'(1 << CNT_W))
        else $error("test_controller: k_len must be below 2^CNT_W");
  end

endmodule
