// dsp_eng: one measurement engine ("DSPeng").
//
// The signal processing runs entirely in logic; two of these engines let two
// measurements run at once, e.g. the booster and the storage ring signals at the
// same instant for a beam phase comparison.  An engine runs one measurement at a
// time, as set up by the sequencer:
//   1. pick one of the four ADC channels and multiply it by the numerical gain;
//   2. mix it with the shared local oscillator to I/Q (iq_mixer);
//   3. integrate I/Q while the window of the chosen trigger is open
//      (window_gen, iq_integrator);
//   4. when the window has closed, compute amplitude and phase (cordic_vec) and
//      offer the result, tagged with its table row, to the result buffer.
//
// Interface: the sequencer offers a setup with `arm_valid`/`arm`; it is taken in
// a clock where `arm_ready` is high (the engine is idle).  The result is offered
// with `res_valid`/`res` and held until `res_ready`.
// Timing: the channel/gain register and the mixer add two clocks, matched by
// delaying the window by one clock more than window_gen's own register, so a
// window [start, stop) integrates exactly the samples taken while the selected
// trigger time ran from start to stop-1.  The result is offered CORDIC_ITER+5
// clocks after the clock in which the trigger time equals stop.
// Channel select, gain, mixing, windowed integration and the two-engine
// arrangement follow the measurement system; the handshakes, pipeline and
// result format are this design's.
module dsp_eng
  import charge_pkg::*;
#(
  parameter int unsigned CORDIC_ITER = 20
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic signed [NUM_CH-1:0][ADC_W-1:0] adc,
  input  logic signed [NCO_W-1:0]       lo_cos,
  input  logic signed [NCO_W-1:0]       lo_sin,
  input  logic [1:0]                    seen,
  input  logic [1:0][TIME_W-1:0]        t,
  input  logic                          arm_valid,
  input  arm_t                          arm,
  output logic                          arm_ready,
  output logic                          res_valid,
  output tagged_result_t                res,
  input  logic                          res_ready
);

  typedef enum logic [1:0] {E_IDLE, E_ARMED, E_CALC, E_RESULT} state_e;
  state_e state;
  arm_t   cfg;

  // ---- channel select and gain ----
  logic signed [SAMP_W-1:0] xs;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xs <= '0;
    else        xs <= SAMP_W'($signed(adc[cfg.m.sig])) * $signed({1'b0, cfg.m.gain});
  end

  // ---- mixer ----
  logic signed [MIX_W-1:0] mi, mq;
  iq_mixer #(.X_W(SAMP_W), .L_W(NCO_W)) u_mix (
    .clk, .rst_n, .x(xs), .lo_cos, .lo_sin, .i_o(mi), .q_o(mq)
  );

  // ---- window ----
  logic win_open, win_done, win_late;
  logic open_d, done_d;
  window_gen #(.T_W(TIME_W)) u_win (
    .clk, .rst_n, .armed(state == E_ARMED), .trig(cfg.m.trig),
    .start(cfg.m.start), .stop(cfg.m.stop), .seen, .t,
    .open_o(win_open), .done_o(win_done), .late_o(win_late)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_d <= 1'b0;
      done_d <= 1'b0;
    end else begin
      open_d <= win_open;
      done_d <= win_done && (state == E_ARMED);
    end
  end

  // ---- integrator ----
  logic signed [ACC_W-1:0] acc_i, acc_q;
  iq_integrator #(.X_W(MIX_W), .A_W(ACC_W)) u_int (
    .clk, .rst_n, .clear(arm_valid && arm_ready), .en(open_d),
    .i_in(mi), .q_in(mq), .acc_i, .acc_q
  );

  // ---- amplitude / phase ----
  logic             c_busy, c_done;
  logic [AMP_W-1:0] c_amp;
  logic [ANG_W-1:0] c_phase;
  cordic_vec #(.IN_W(ACC_W), .OUT_W(AMP_W), .Z_W(ANG_W), .ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n, .start(state == E_ARMED && done_d), .i_in(acc_i), .q_in(acc_q),
    .busy_o(c_busy), .done_o(c_done), .amp_o(c_amp), .phase_o(c_phase)
  );

  // ---- control ----
  assign arm_ready = (state == E_IDLE);
  assign res_valid = (state == E_RESULT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      cfg   <= '0;
      res   <= '0;
    end else begin
      unique case (state)
        E_IDLE: if (arm_valid) begin
          cfg   <= arm;
          state <= E_ARMED;
        end
        E_ARMED: if (done_d) begin
          res.idx    <= cfg.idx;
          res.r.i    <= acc_i;
          res.r.q    <= acc_q;
          res.r.late <= win_late;
          state      <= E_CALC;
        end
        E_CALC: if (c_done) begin
          res.r.amp   <= c_amp;
          res.r.phase <= c_phase;
          state       <= E_RESULT;
        end
        E_RESULT: if (res_ready) state <= E_IDLE;
        default: state <= E_IDLE;
      endcase
    end
  end

  // Handshake rules, checked in simulation:
  //  - a result, once offered, stays offered and unchanged until it is taken;
  //  - the CORDIC is only started when it is idle.
  logic           res_pend;
  tagged_result_t res_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_pend <= 1'b0;
      res_prev <= '0;
    end else begin
      if (res_pend) a_res_hold: assert (res_valid && res == res_prev);
      if (state == E_ARMED && done_d) a_cordic_free: assert (!c_busy);
      res_pend <= res_valid && !res_ready;
      res_prev <= res;
    end
  end

endmodule
