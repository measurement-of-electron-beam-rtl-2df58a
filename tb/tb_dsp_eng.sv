// tb_dsp_eng: runs random measurements through one engine.  The ADC channels
// carry random samples, the oscillator is held at a random constant vector and the
// trigger times are driven by the testbench.  For each measurement the expected
// I/Q integrals are summed independently from the samples taken while the
// selected trigger time ran from start to stop-1 (each sample times the gain,
// mixed with the oscillator in real arithmetic); amplitude and phase are compared
// with sqrt/atan2 of those integrals.  Also checked: the table row tag, the late
// flag when armed after the window start, that the engine refuses a new setup
// while busy, that the result is held under back-pressure, and the latency from
// the window end to the result (CORDIC_ITER+5 clocks).
module tb_dsp_eng;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int ITER = 20;
  logic signed [NUM_CH-1:0][ADC_W-1:0] adc;
  logic signed [NCO_W-1:0] lo_cos, lo_sin;
  logic [1:0]              seen;
  logic [1:0][TIME_W-1:0]  t;
  logic                    arm_valid, arm_ready, res_valid, res_ready;
  arm_t                    arm;
  tagged_result_t          res;

  dsp_eng #(.CORDIC_ITER(ITER)) dut (.clk, .rst_n, .adc, .lo_cos, .lo_sin, .seen, .t,
    .arm_valid, .arm, .arm_ready, .res_valid, .res, .res_ready);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam real PI = 3.14159265358979323846;

  task automatic measure(trig_sel_e src, int sig, int gain, int s, int e, int arm_at, int row);
    longint ei, eq;
    int tt, lo, t_stop_cycle, t_valid, cyc, hold;
    bit got, exp_late;
    real ea, ep, dp;
    ei = 0; eq = 0; got = 0; cyc = 0; t_stop_cycle = -1; t_valid = -1;
    lo_cos = NCO_W'(int'($urandom_range(0, 65534)) - 32767);
    lo_sin = NCO_W'(int'($urandom_range(0, 65534)) - 32767);
    arm.m.trig = src; arm.m.sig = 2'(sig); arm.m.dsp = 1'b0; arm.m.gain = GAIN_W'(gain);
    arm.m.start = TIME_W'(s); arm.m.stop = TIME_W'(e); arm.idx = TBL_AW'(row);
    lo = (arm_at < 0) ? s : ((arm_at + 1 > s) ? arm_at + 1 : s);
    exp_late = (arm_at >= 0) && (arm_at + 1 > s);
    seen = '0; t = '{default: '1};
    res_ready = 1'b0;
    tt = -5;
    while (!got && cyc < 5000) begin
      // drive this cycle's inputs
      if (tt == 0) begin seen[src] = 1'b1; t[src] = '0; end
      else if (tt > 0) t[src] = t[src] + 1'b1;
      t[!src] = TIME_W'(tt + 1000);
      for (int c = 0; c < NUM_CH; c++) adc[c] = ADC_W'($urandom);
      arm_valid = (tt == arm_at);
      if (tt >= 0 && tt == e) t_stop_cycle = cyc;
      if (tt >= lo && tt < e) begin
        ei += longint'($floor(real'($signed(adc[sig])) * gain * real'(lo_cos) / 32768.0 + 0.5));
        eq += longint'($floor(-real'($signed(adc[sig])) * gain * real'(lo_sin) / 32768.0 + 0.5));
      end
      if (res_valid) begin
        if (t_valid < 0) begin t_valid = cyc; hold = $urandom_range(0, 4); end
        res_ready = (cyc - t_valid >= hold);
      end
      @(posedge clk);
      if (tt == arm_at) chk(arm_ready, "idle when armed");
      if (tt == arm_at + 3) chk(!arm_ready, "busy while measuring");
      if (res_valid && res_ready) got = 1'b1;
      @(negedge clk);
      tt++; cyc++;
    end
    arm_valid = 1'b0; res_ready = 1'b0;
    chk(got, "result delivered");
    chk(t_valid - t_stop_cycle == ITER + 5, $sformatf("latency %0d", t_valid - t_stop_cycle));
    chk(res.idx == TBL_AW'(row), "row tag");
    chk(longint'(res.r.i) == ei && longint'(res.r.q) == eq,
        $sformatf("sums got %0d,%0d exp %0d,%0d", res.r.i, res.r.q, ei, eq));
    chk(res.r.late == exp_late, $sformatf("late %0d exp %0d", res.r.late, exp_late));
    ea = $sqrt(real'(ei) * real'(ei) + real'(eq) * real'(eq));
    chk(real'(res.r.amp) - ea < 2.0 + ea * 1e-4 && ea - real'(res.r.amp) < 2.0 + ea * 1e-4,
        $sformatf("amp %0d exp %f", res.r.amp, ea));
    ep = $atan2(real'(eq), real'(ei)) / (2.0 * PI) * 65536.0;
    dp = real'(res.r.phase) - ep;
    while (dp > 32768.0) dp -= 65536.0;
    while (dp < -32768.0) dp += 65536.0;
    chk(ea < 1000.0 || (dp < 2.0 && dp > -2.0), $sformatf("phase %0d exp %f", res.r.phase, ep));
    @(negedge clk);
    chk(arm_ready, "idle after result taken");
  endtask

  initial begin
    arm_valid = 0; res_ready = 0; arm = '0; seen = '0; t = '0; adc = '0;
    lo_cos = 0; lo_sin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    measure(TRIG_LINAC, 0, 1, 10, 50, -2, 3);
    measure(TRIG_EXTR, 3, 2, 0, 1, -1, 4);
    measure(TRIG_LINAC, 2, 15, 20, 120, 30, 5);     // armed late
    for (int n = 0; n < 60; n++) begin
      int s, e;
      s = $urandom_range(0, 200);
      e = s + $urandom_range(1, 300);
      measure(trig_sel_e'($urandom_range(0, 1)), $urandom_range(0, 3), $urandom_range(0, 15),
              s, e, ($urandom_range(0, 4) == 0) ? int'($urandom_range(0, e)) : -int'($urandom_range(1, 4)),
              $urandom_range(0, TBL_DEPTH - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
