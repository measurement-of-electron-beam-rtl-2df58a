// iq_mixer: digital down-conversion of the IF samples to baseband I/Q.
//
// The 352.2 MHz stripline signal, undersampled at 108 MHz, appears as an IF near
// 28 MHz.  Multiplying it by the local oscillator's cosine and minus sine
// (x * e^{-jwt}) moves the carrier to a few kHz; integrating the result over the
// window then gives the beam signal's amplitude and phase.
//
// I = round(x * cos / 2**(NCO_W-1)),  Q = round(-x * sin / 2**(NCO_W-1)), ties
// rounded up.  Rounding to nearest matters: truncation would add a -1/2 LSB bias
// to every I and Q sample, i.e. a fixed vector offset of N/2 LSB in each integral
// that corrupts small amplitude differences.  Since |cos|,|sin| < 2**(NCO_W-1)
// the results fit in the input width.
// Timing: one register stage; outputs follow the inputs by one clock.
// That the IF is mixed with the NCO is the measurement system's; the sign
// convention, scaling and single pipeline stage are choices of this design.
module iq_mixer
  import charge_pkg::*;
#(
  parameter int unsigned X_W = SAMP_W,  // sample width
  parameter int unsigned L_W = NCO_W    // oscillator width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [X_W-1:0] x,
  input  logic signed [L_W-1:0] lo_cos,
  input  logic signed [L_W-1:0] lo_sin,
  output logic signed [X_W-1:0] i_o,
  output logic signed [X_W-1:0] q_o
);

  localparam int unsigned P_W = X_W + L_W;

  logic signed [P_W-1:0] p_i, p_q, s_i, s_q;

  always_comb begin
    p_i = P_W'(x) * P_W'(lo_cos);
    p_q = -(P_W'(x) * P_W'(lo_sin));
    s_i = (p_i + P_W'(2 ** (L_W - 2))) >>> (L_W - 1);
    s_q = (p_q + P_W'(2 ** (L_W - 2))) >>> (L_W - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_o <= '0;
      q_o <= '0;
    end else begin
      i_o <= s_i[X_W-1:0];
      q_o <= s_q[X_W-1:0];
    end
  end

endmodule
