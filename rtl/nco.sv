// nco: numerically controlled local oscillator.
//
// The IF samples are mixed with a free-running local oscillator whose frequency is
// set by the control system to within a few kHz of the IF; it is not locked to the
// beam, so the absolute phase of one measurement is meaningless, but both DSP
// engines share this single oscillator and the phase difference between two
// simultaneous measurements is exact.
//
// How it works: a PHASE_W-bit phase accumulator advances by `inc` every clock
// (f_out = inc / 2**PHASE_W * f_clk).  Its top LUT_AW+2 bits are the phase used:
// two select the quadrant, LUT_AW address a quarter-wave table holding
// sin(2*pi*(k+0.5)/2**(LUT_AW+2)), computed at elaboration.  The half-step
// offset makes the quadrant mirroring exact; it shifts the oscillator phase by a
// constant, which cancels in every phase difference.  Cosine uses the same logic
// a quarter turn ahead.  Amplitude is 2**(NCO_W-1)-1.  With the defaults the
// phase is resolved to 1/4096 turn, so the phase-truncation error stays below
// 0.045 degree.
//
// Timing: `cos_o`/`sin_o` are registered; they follow the accumulator by one clock
// and are valid every clock after reset.  A changed `inc` acts on the next clock.
// The frequency word and its 28.0315 MHz reset value are from the reference
// configuration; the table size and amplitude are choices of this design.
module nco
  import charge_pkg::*;
#(
  parameter int unsigned P_W = PHASE_W,  // phase accumulator width
  parameter int unsigned A_W = LUT_AW,   // quarter-wave table address width
  parameter int unsigned D_W = NCO_W     // sine/cosine output width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [P_W-1:0]        inc,     // phase increment per clock
  output logic signed [D_W-1:0] cos_o,
  output logic signed [D_W-1:0] sin_o
);

  localparam int unsigned DEPTH = 2 ** A_W;      // quarter-wave entries
  localparam int unsigned Q_W   = A_W + 2;       // phase bits used
  typedef logic [D_W-2:0] lut_t [DEPTH];         // magnitudes, sign added later

  function automatic lut_t make_lut();
    lut_t t;
    real  amp;
    amp = real'((2 ** (D_W - 1)) - 1);
    for (int k = 0; k < DEPTH; k++)
      t[k] = (D_W-1)'($rtoi(amp * $sin(2.0 * 3.14159265358979323846 * (real'(k) + 0.5)
                                       / real'(4 * DEPTH)) + 0.5));
    return t;
  endfunction

  localparam lut_t QLUT = make_lut();

  // Sine of a Q_W-bit phase from the quarter-wave table.
  function automatic logic signed [D_W-1:0] qsin(logic [Q_W-1:0] p);
    logic [A_W-1:0] a;
    logic [D_W-2:0] m;
    a = p[Q_W-2] ? ~p[A_W-1:0] : p[A_W-1:0];
    m = QLUT[a];
    return p[Q_W-1] ? -$signed({1'b0, m}) : $signed({1'b0, m});
  endfunction

  logic [P_W-1:0] phase;
  logic [Q_W-1:0] p_sin, p_cos;

  assign p_sin = phase[P_W-1 -: Q_W];
  assign p_cos = p_sin + Q_W'(DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      phase <= phase + inc;
      cos_o <= qsin(p_cos);
      sin_o <= qsin(p_sin);
    end
  end

endmodule
