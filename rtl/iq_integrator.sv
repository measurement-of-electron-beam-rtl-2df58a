// iq_integrator: integrates the demodulated I and Q samples over the window.
//
// `clear` zeroes both sums; each clock with `en` high adds the current I/Q sample.
// With the default widths the sums cannot overflow for any window that the
// trigger-relative time counter can express (2**TIME_W samples of full-scale
// input).  Timing: the sums include a sample one clock after it is presented.
// `clear` wins over `en`.
// Integration over an adjustable window is the measurement system's; the plain
// accumulator and its widths are this design's.
module iq_integrator
  import charge_pkg::*;
#(
  parameter int unsigned X_W = MIX_W,
  parameter int unsigned A_W = ACC_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  en,
  input  logic signed [X_W-1:0] i_in,
  input  logic signed [X_W-1:0] q_in,
  output logic signed [A_W-1:0] acc_i,
  output logic signed [A_W-1:0] acc_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0;
      acc_q <= '0;
    end else if (clear) begin
      acc_i <= '0;
      acc_q <= '0;
    end else if (en) begin
      acc_i <= acc_i + A_W'(i_in);
      acc_q <= acc_q + A_W'(q_in);
    end
  end

endmodule
