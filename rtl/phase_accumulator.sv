// phase_accumulator: the phase accumulator of one NCO.
//
// An n-bit register adds the frequency word f every clock and wraps modulo
// 2^n, so the output phase advances by f/2^n of a cycle per clock and the
// synthesized tone has frequency f * f_clk / 2^n. The initial phase word
// theta is added to the register value on the way out, giving
// phase = acc + theta (mod 2^n). This structure (adder, Z^-1 register, theta
// input) follows the NCO block diagram.
//
// Design choices not fixed by the architecture: `load` synchronously restarts
// the register at zero, so that all NCOs of the generator start in a known
// phase relation at the start of a measurement; the asynchronous active-low
// reset also clears it.
//
// Timing: after a clock edge with load=1, phase = theta; after k further
// edges with load=0, phase = k*f + theta (mod 2^n). The output is
// combinational from the register and theta.
module phase_accumulator #(
  parameter int unsigned PHASE_W = 16   // n
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [PHASE_W-1:0] freq,     // frequency word f
  input  logic [PHASE_W-1:0] theta,    // initial phase word
  output logic [PHASE_W-1:0] phase
);

  logic [PHASE_W-1:0] acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc_q <= '0;
    else if (load)  acc_q <= '0;
    else            acc_q <= acc_q + freq;
  end

  assign phase = acc_q + theta;

endmodule
