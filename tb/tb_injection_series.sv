// tb_injection_series: a series of 41 injection cycles in 16-bunch mode, with the
// schedule compressed in time (extraction 20 us after the linac trigger) so that
// the whole series simulates in seconds.  The oscillator frequency is set over
// the host bus.
//
// The ADC model adds uniform +-0.5 LSB noise so that rounding errors do not
// correlate with the nearly periodic tone.
// Beam model per cycle n: a linac shot of random charge passes TL1, part of it
// survives in the booster, is extracted through TL2 and part of that is added to
// the stored storage ring beam.  Transfer efficiencies and the booster beam
// phase change randomly from cycle to cycle.  From cycle 34 on the linac is off,
// so the stored beam stays constant.  After every cycle the testbench reads the
// results over the host bus, as a control system would, and checks:
//   * the storage ring charge rises with each injection and stays flat after;
//   * the TL1->SY and TL2->SR efficiencies computed from the results match the
//     model's, within 2 %;
//   * the booster-minus-storage-ring phase matches the model's within 1.5 deg;
//   * every result carries the number of the cycle that produced it.
module tb_injection_series;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [NUM_CH-1:0][ADC_W-1:0] adc;
  logic                   trig_linac, trig_extr;
  logic [HOST_AW-1:0]     host_addr;
  logic                   host_we;
  logic [HOST_DW-1:0]     host_wdata, host_rdata;
  logic [3:0]             rf_switch;
  logic [NUM_CH-1:0][4:0] att1, att2;
  logic                   cycle_done;

  charge_top dut (.clk, .rst_n, .adc, .trig_linac, .trig_extr, .host_addr, .host_we,
    .host_wdata, .host_rdata, .rf_switch, .att1, .att2, .cycle_done);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", msg); end
  endtask

  localparam real PI = 3.14159265358979323846;
  localparam int  NCYC = 41, LAST_INJ = 33, NROWS = 7;
  localparam real EXTR_US = 20.0;
  // Oscillator retuned to 316/1216 of the sample rate (28.066 MHz): the 608-sample
  // storage ring windows then hold a whole number of periods of the mixer's
  // double-frequency term, which a plain integrator otherwise lets through at up
  // to a few per mille; the TL2->SR efficiency is a small difference of two such
  // integrals and needs that precision.
  localparam logic [31:0] NCO_INC = 32'((64'd316 << 32) / 64'd1216);

  // trig, sig, gain, dsp, start, stop (us)
  typedef struct { int trig; int sig; int gain; int dsp; real s; real e; } row_t;
  row_t sched [NROWS] = '{
    '{0, 0, 1, 0,  0.19,  2.18},   // TL1 shot
    '{0, 1, 1, 1,  2.96,  6.94},   // booster after injection
    '{0, 3, 2, 0,  2.96,  8.59},   // storage ring before injection
    '{0, 1, 1, 1, 15.00, 18.98},   // booster before extraction
    '{0, 3, 2, 0, 15.00, 18.98},   // storage ring, same window (phase)
    '{1, 2, 1, 0,  0.19,  2.18},   // TL2 shot
    '{1, 3, 2, 1,  4.17,  9.80}    // storage ring after injection
  };
  function automatic int us2clk(real us);
    return $rtoi(us * real'(FS_KHZ) / 1000.0 + 0.5);
  endfunction

  // ---- beam model state for the current cycle ----
  real a_tl1, a_sy, a_tl2, s_before, s_after, ph_sy;
  localparam real PH_SR = 100.0, PH_TL = 30.0;
  // TL2 and SR pickups are 10 times less sensitive than TL1 (same for both, so
  // the TL2->SR efficiency needs no calibration factor)
  localparam real CAL = 0.1;
  real f_tone, ph;
  int  tl = -1, te = -1, pend_l = -1, pend_e = -1;

  function automatic real env(int ch, output real deg);
    real ul, ue;
    ul = (tl < 0) ? -1.0 : real'(tl) * 1000.0 / real'(FS_KHZ);
    ue = (te < 0) ? -1.0 : real'(te) * 1000.0 / real'(FS_KHZ);
    deg = PH_TL;
    case (ch)
      0: return (ul >= 0.5 && ul < 1.5) ? a_tl1 : 0.0;
      1: begin deg = ph_sy; return (ul >= 2.5 && te < 0) ? a_sy : 0.0; end
      2: return (ue >= 0.5 && ue < 1.5) ? a_tl2 : 0.0;
      default: begin deg = PH_SR; return (ue >= 3.0) ? s_after : s_before; end
    endcase
  endfunction

  always @(negedge clk) begin
    if (pend_l >= 0) begin pend_l--; if (pend_l < 0) begin tl = 0; te = -1; end end
    else if (tl >= 0) tl++;
    if (pend_e >= 0) begin pend_e--; if (pend_e < 0) te = 0; end
    else if (te >= 0) te++;
    ph = ph + f_tone;
    ph = ph - $floor(ph);
    for (int c = 0; c < NUM_CH; c++) begin
      real a, d;
      a = env(c, d);
      adc[c] = ADC_W'($rtoi($floor(a * $cos(2.0 * PI * ph + d * PI / 180.0) + 0.5
                                   + real'($urandom_range(0, 999)) / 1000.0 - 0.5)));
    end
  end

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    host_addr = HOST_AW'(a); host_we = 1'b1; host_wdata = d;
    @(negedge clk) host_we = 1'b0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk);
    host_addr = HOST_AW'(a); host_we = 1'b0;
    @(negedge clk);
    d = host_rdata;
  endtask

  real amp [NROWS], phs [NROWS];
  real sr_prev;
  logic [31:0] d, d2;

  function automatic real wrap(real x);
    while (x > 180.0) x -= 360.0;
    while (x < -180.0) x += 360.0;
    return x;
  endfunction

  initial begin
    int n_sy_checks, n_sr_checks;
    adc = '0; trig_linac = 0; trig_extr = 0; host_addr = 0; host_we = 0; host_wdata = 0;
    ph = 0.0; a_tl1 = 0; a_sy = 0; a_tl2 = 0; s_before = 350.0; s_after = 350.0; ph_sy = 0;
    f_tone = real'(NCO_INC) / 4294967296.0 + 2000.0 / (real'(FS_KHZ) * 1000.0);
    n_sy_checks = 0; n_sr_checks = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NROWS; r++) begin
      wr('h400 + 4 * r, {1'(sched[r].trig), 2'(sched[r].sig), 1'(sched[r].dsp),
                         4'(sched[r].gain), 24'(us2clk(sched[r].s))});
      wr('h401 + 4 * r, 32'(us2clk(sched[r].e)));
      wr('h402 + 4 * r, 32'h0);          // front end stays on the registers
      wr('h403 + 4 * r, 32'h0);
    end
    wr('h002, NCO_INC);
    wr('h001, NROWS);
    wr('h000, 1);
    sr_prev = -1.0;
    for (int n = 0; n < NCYC; n++) begin
      real eff1, eff2, exp_eff1, exp_eff2, m_eff1, m_eff2, n_burst;
      bit inj;
      inj   = (n <= LAST_INJ);
      eff1  = 0.70 + 0.2 * real'($urandom_range(0, 1000)) / 1000.0;
      eff2  = 0.80 + 0.15 * real'($urandom_range(0, 1000)) / 1000.0;
      a_tl1 = inj ? 1200.0 + 300.0 * real'($urandom_range(0, 1000)) / 1000.0 : 0.0;
      a_sy  = a_tl1 * eff1 * 0.25;     // booster signal: bunch spread over the turn
      a_tl2 = CAL * a_sy / 0.25;       // extracted charge seen by the TL2 pickup
      ph_sy = 200.0 + 60.0 * real'($urandom_range(0, 1000)) / 1000.0;
      s_before = s_after;
      // storage ring gain in charge: eff2 * TL2 charge; both windows are compared
      // through their integrals, so express it per window sample
      n_burst  = real'(us2clk(1.5) - us2clk(0.5));
      s_after  = s_before + eff2 * a_tl2 * n_burst / real'(us2clk(9.80) - us2clk(4.17));
      // expected efficiencies as the control system would compute them
      exp_eff1 = eff1;
      exp_eff2 = eff2;

      @(negedge clk) trig_linac = 1'b1; pend_l = 2;
      repeat (5) @(negedge clk);
      trig_linac = 1'b0;
      repeat (us2clk(EXTR_US) - 6) @(negedge clk);
      trig_extr = 1'b1; pend_e = 2;
      repeat (5) @(negedge clk);
      trig_extr = 1'b0;
      while (!cycle_done) @(negedge clk);

      for (int r = 0; r < NROWS; r++) begin
        rd('h800 + 8 * r + 4, d); rd('h800 + 8 * r + 5, d2);
        amp[r] = real'(longint'({d2, d}));
        rd('h800 + 8 * r + 6, d);
        phs[r] = real'(d[15:0]) * 360.0 / 65536.0;
        rd('h800 + 8 * r + 7, d);
        chk(d == n, $sformatf("cycle %0d row %0d tag %0d", n, r, d));
      end
      // storage ring: before-injection integral over window 2 vs previous cycle
      if (sr_prev >= 0.0) begin
        if (n <= LAST_INJ + 1) chk(amp[2] > sr_prev * 1.001, $sformatf("cycle %0d SR rises", n));
        else chk(amp[2] < sr_prev * 1.002 && amp[2] > sr_prev * 0.998, $sformatf("cycle %0d SR flat", n));
      end
      sr_prev = amp[2];
      if (inj) begin
        // TL1 -> SY: booster integral per sample vs TL1 shot integral per burst sample
        m_eff1 = (amp[3] / real'(us2clk(18.98) - us2clk(15.0)) / 0.25) /
                 (amp[0] / n_burst);
        // TL2 -> SR: increase of the SR integral (same window length, gain 2)
        m_eff2 = ((amp[6] - amp[2]) / 2.0) / amp[5];
        chk(m_eff1 > exp_eff1 * 0.98 && m_eff1 < exp_eff1 * 1.02,
            $sformatf("cycle %0d TL1->SY efficiency %f exp %f", n, m_eff1, exp_eff1));
        chk(m_eff2 > exp_eff2 * 0.98 && m_eff2 < exp_eff2 * 1.02,
            $sformatf("cycle %0d TL2->SR efficiency %f exp %f", n, m_eff2, exp_eff2));
        chk(wrap(phs[3] - phs[4] - (ph_sy - PH_SR)) < 1.5 && wrap(phs[3] - phs[4] - (ph_sy - PH_SR)) > -1.5,
            $sformatf("cycle %0d phase error %f", n, wrap(phs[3] - phs[4] - (ph_sy - PH_SR))));
        n_sy_checks++;
      end
      n_sr_checks++;
    end
    rd('h006, d); chk(d == NCYC, "cycle counter");
    chk(n_sy_checks == LAST_INJ + 1 && n_sr_checks == NCYC, "all cycles evaluated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
