// sine_lut: the sin/cos look-up table of an NCO.
//
// A full-wave table of 2^p signed N-bit samples, entry a holding
//   round((2^(N-1) - 1) * sin(2*pi*a / 2^p)),
// computed when the design is elaborated (no data file). A cosine is the same
// table read with a quarter-turn phase offset, which the NCO's initial phase
// word supplies, so one table serves both. The output is registered: the
// sample for `addr` appears one clock after it is presented.
//
// The table contents, its full-wave organisation and the output register are
// this design's choices; the architecture specifies only that a look-up
// table turns the truncated phase into a digital sine.
module sine_lut #(
  parameter int unsigned ADDR_W = 10,   // p
  parameter int unsigned DATA_W = 8     // N
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [DATA_W-1:0] sample
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic signed [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real amp;
    amp = (2.0 ** (DATA_W - 1)) - 1.0;
    for (int unsigned a = 0; a < DEPTH; a++)
      t[a] = DATA_W'($rtoi($floor(amp * $sin(2.0 * 3.14159265358979323846 * real'(a) / real'(DEPTH)) + 0.5)));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) sample <= TABLE[addr];

endmodule
