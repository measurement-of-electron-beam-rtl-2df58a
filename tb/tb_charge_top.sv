// tb_charge_top: end-to-end test of the charge measurement firmware at its
// default sizes.
//
// The ADC inputs are driven by a beam model: each of the four channels carries a
// tone 2 kHz away from the local oscillator frequency (the oscillator is not
// locked to the beam), with its own phase, gated on and off by a beam presence
// model of one injection cycle:
//   TL1  burst 0.5-1.5 us after the linac trigger
//   SY   stored in the booster from 2.5 us after the linac trigger until extraction
//        (amplitude drops at 5 ms to model losses during the ramp)
//   TL2  burst 0.5-1.5 us after the extraction pulse
//   SR   stored beam, amplitude steps up 3 us after extraction (injected charge)
// Cycle 1 loads the 16-row reference schedule (windows from 0.19 us to 38.84 ms
// after the linac trigger and up to 37 ms after extraction, which comes 50 ms
// after the linac trigger) and runs it at full timing, about 9.4 million clocks.
// Every result is read back through the host bus and compared with an
// independent reference: the integral of the tone envelope times gain/2 over the
// samples inside the window (0.5 % tolerance), and, for the five pairs of
// simultaneous booster/storage ring measurements, the booster-minus-storage-ring
// phase against the model's phase difference (1.5 degree tolerance).
// Cycle 2 runs a short schedule that arms an engine after its window start (late
// flag) and sends a linac trigger during the pass (overrun flag).  One of its
// rows carries its own crossbar and attenuator setting: the front-end outputs
// must take it when that row is set up and return to the registers after the
// pass.
// Mechanisms counted, each must occur: both engines integrating at once, windows
// timed from each trigger source, the sequencer waiting for a busy engine, two
// results offered in the same clock, a late arm, an overrun, the cycle-complete
// pulse, a row setting the front end.
module tb_charge_top;
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
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", msg); end
  endtask

  // ---------------- reference schedule ----------------
  typedef struct {
    int  trig; int sig; int gain; int dsp; real start_us; real stop_us;
  } row_t;
  localparam int NROWS = 16;
  // front-end setting carried by one row of cycle 2
  localparam fe_cfg_t ROW_FE = '{sw: 4'd5, att1: {NUM_CH{5'd3}}, att2: {NUM_CH{5'd7}}};
  row_t sched [NROWS] = '{
    '{0, 0, 1, 0,     0.19,     2.18}, '{0, 1, 1, 1,     2.96,     6.94},
    '{0, 3, 2, 0,     2.96,     8.59}, '{0, 1, 1, 1,    21.48,    25.46},
    '{0, 3, 2, 0,    21.48,    27.11}, '{0, 1, 1, 1,    40.00,    43.98},
    '{0, 3, 2, 0,    40.00,    45.63}, '{0, 1, 1, 1,  9299.0,   9303.0},
    '{0, 3, 2, 0,  9299.0,   9304.0},  '{0, 1, 1, 1, 18558.0,  18562.0},
    '{0, 3, 2, 0, 18558.0,  18564.0},  '{0, 1, 1, 1, 38836.0,  38840.0},
    '{1, 2, 1, 0,     0.19,     2.18}, '{1, 3, 2, 1,     4.17,     9.80},
    '{1, 3, 2, 0, 18522.0,  18528.0},  '{1, 3, 2, 1, 37041.0,  37046.0}
  };
  function automatic int us2clk(real us);
    return $rtoi(us * real'(FS_KHZ) / 1000.0 + 0.5);
  endfunction

  // ---------------- beam model ----------------
  localparam real PI     = 3.14159265358979323846;
  localparam real DF_HZ  = 2000.0;
  localparam real PH_DEG [NUM_CH] = '{10.0, 40.0, 75.0, 100.0};
  real f_tone;                 // tone frequency / sample rate
  real ph;                     // tone phase, turns
  int  tl = -1, te = -1;       // design-side time since linac / extraction, -1 before
  longint cyc = 0;

  function automatic real env(int ch);
    real tus_l, tus_e;
    tus_l = (tl < 0) ? -1.0 : real'(tl) * 1000.0 / real'(FS_KHZ);
    tus_e = (te < 0) ? -1.0 : real'(te) * 1000.0 / real'(FS_KHZ);
    case (ch)
      0: return (tus_l >= 0.5 && tus_l < 1.5) ? 1500.0 : 0.0;
      1: return (tus_l >= 2.5 && te < 0) ? ((tus_l < 5000.0) ? 1200.0 : 1150.0) : 0.0;
      2: return (tus_e >= 0.5 && tus_e < 1.5) ? 1000.0 : 0.0;
      default: return (tus_e >= 3.0) ? 700.0 : 600.0;
    endcase
  endfunction

  // Reference integrals per row: sum of envelope*gain/2 over window samples.
  real exp_amp [NROWS];
  int  row_start [NROWS], row_stop [NROWS];
  bit  model_on;

  // Trigger pulses are raised at a negedge; the design's time for that source is
  // 0 for the sample driven three negedges later (synchroniser and edge detect).
  int pend_l = -1, pend_e = -1;

  always @(negedge clk) begin
    cyc++;
    if (pend_l >= 0) begin pend_l--; if (pend_l < 0) begin tl = 0; te = -1; end end
    else if (tl >= 0) tl++;
    if (pend_e >= 0) begin pend_e--; if (pend_e < 0) te = 0; end
    else if (te >= 0) te++;
    ph = ph + f_tone;
    ph = ph - $floor(ph);
    for (int c = 0; c < NUM_CH; c++) begin
      real e;
      e = env(c);
      adc[c] = ADC_W'($rtoi($floor(e * $cos(2.0 * PI * ph + PH_DEG[c] * PI / 180.0) + 0.5)));
    end
    if (model_on) begin
      for (int r = 0; r < NROWS; r++) begin
        int tt;
        tt = (sched[r].trig == 0) ? tl : te;
        if (tt >= row_start[r] && tt < row_stop[r])
          exp_amp[r] += env(sched[r].sig) * real'(sched[r].gain) / 2.0 * 32767.0 / 32768.0;
      end
    end
  end

  task automatic pulse_linac();
    @(negedge clk) trig_linac = 1'b1; pend_l = 2;
    repeat (5) @(negedge clk);
    trig_linac = 1'b0;
  endtask
  task automatic pulse_extr();
    @(negedge clk) trig_extr = 1'b1; pend_e = 2;
    repeat (5) @(negedge clk);
    trig_extr = 1'b0;
  endtask

  // ---------------- host bus ----------------
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
  task automatic write_row(int r, int trig, int sig, int gain, int dsp, int s, int e,
                           logic fe_set = 1'b0, fe_cfg_t fe = '0);
    wr('h400 + 4 * r, {1'(trig), 2'(sig), 1'(dsp), 4'(gain), 24'(s)});
    wr('h401 + 4 * r, 32'(e));
    wr('h402 + 4 * r, {fe_set, 7'h00, fe.att1, fe.sw});
    wr('h403 + 4 * r, 32'(fe.att2));
  endtask

  // ---------------- mechanism counters ----------------
  int n_parallel, n_trig_extr_win, n_arm_wait, n_both_res, n_cycle_done, n_fe_row;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_eng[0].u_eng.open_d && dut.g_eng[1].u_eng.open_d) n_parallel++;
    for (int k = 0; k < NUM_DSP; k++)
      if (dut.arm_valid[k] && !dut.arm_ready[k]) n_arm_wait++;
    for (int k = 0; k < NUM_DSP; k++)
      if (dut.arm_valid[k] && dut.arm_ready[k] && dut.arm.m.trig == TRIG_EXTR) n_trig_extr_win++;
    if (dut.res_valid == '1) n_both_res++;
    if (cycle_done) n_cycle_done++;
    if (rf_switch == ROW_FE.sw && att1 == ROW_FE.att1 && att2 == ROW_FE.att2) n_fe_row++;
  end

  logic [31:0] d, d2;
  longint amp;
  real    ph_row [NROWS];
  initial begin
    adc = '0; trig_linac = 0; trig_extr = 0; host_addr = 0; host_we = 0; host_wdata = 0;
    ph = 0.0; model_on = 1'b0;
    n_parallel = 0; n_trig_extr_win = 0; n_arm_wait = 0; n_both_res = 0; n_cycle_done = 0;
    n_fe_row = 0;
    f_tone = real'(NCO_INC_RESET) / 4294967296.0 + DF_HZ / (real'(FS_KHZ) * 1000.0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // front-end configuration as on the reference configuration screen
    rd('h003, d); chk(d == 12, "switch reset value");
    chk(rf_switch == 4'd12 && att1[2] == 5'd10 && att2[0] == 5'd10, "front end reset values");
    wr('h004, {5'd9, 5'd10, 5'd11, 5'd12});
    chk(att1[0] == 5'd12 && att1[3] == 5'd9, "attenuator write");

    // ---------------- cycle 1: reference schedule ----------------
    for (int r = 0; r < NROWS; r++) begin
      row_start[r] = us2clk(sched[r].start_us);
      row_stop[r]  = us2clk(sched[r].stop_us);
      exp_amp[r]   = 0.0;
      write_row(r, sched[r].trig, sched[r].sig, sched[r].gain, sched[r].dsp,
                row_start[r], row_stop[r]);
    end
    rd('h400 + 4 * 13, d); chk(d[31] && d[30:29] == 3 && d[28] && d[23:0] == 24'(row_start[13]), "table read back");
    wr('h001, NROWS);
    wr('h000, 1);
    model_on = 1'b1;
    pulse_linac();
    repeat (us2clk(50000.0)) @(negedge clk);
    pulse_extr();
    while (!cycle_done) @(negedge clk);
    repeat (10) @(negedge clk);
    model_on = 1'b0;
    rd('h006, d); chk(d == 1, $sformatf("cycle counter %0d", d));
    rd('h007, d); chk(d[2:0] == 3'b000, $sformatf("status after cycle 1 %b", d[2:0]));
    for (int r = 0; r < NROWS; r++) begin
      rd('h800 + 8 * r + 4, d); rd('h800 + 8 * r + 5, d2);
      amp = longint'({d2, d});
      chk(real'(amp) > exp_amp[r] * 0.995 - 50.0 && real'(amp) < exp_amp[r] * 1.005 + 50.0,
          $sformatf("row %0d amplitude %0d exp %f", r, amp, exp_amp[r]));
      rd('h800 + 8 * r + 6, d);
      chk(!d[31], $sformatf("row %0d not late", r));
      ph_row[r] = real'(d[15:0]) * 360.0 / 65536.0;
      rd('h800 + 8 * r + 7, d);
      chk(d == 0, $sformatf("row %0d cycle tag %0d", r, d));
    end
    // booster vs storage ring phase on the simultaneous pairs
    for (int r = 1; r < 11; r += 2) begin
      real dp;
      dp = ph_row[r] - ph_row[r + 1] - (PH_DEG[1] - PH_DEG[3]);
      while (dp > 180.0) dp -= 360.0;
      while (dp < -180.0) dp += 360.0;
      chk(dp < 1.5 && dp > -1.5, $sformatf("rows %0d/%0d phase difference error %f deg", r, r + 1, dp));
    end
    // sanity of the reference: TL1 charge seen, SR larger after injection
    chk(exp_amp[0] > 1000.0 && exp_amp[13] > 0.0, "reference windows contain beam");

    // ---------------- cycle 2: late arm and overrun ----------------
    write_row(0, 0, 0, 1, 0, 10, 60);
    write_row(1, 0, 1, 1, 1, 15, 60);     // same stop as row 0: results collide
    write_row(2, 0, 3, 2, 0, 20, 80,      // engine 0 still busy at 20: armed late;
              1'b1, ROW_FE);              // sets its own front end
    write_row(3, 1, 2, 1, 1, 5, 40);
    wr('h001, 4);
    pulse_linac();
    repeat (10) @(negedge clk);
    pulse_linac();                        // arrives during the pass: overrun
    while (!dut.fe_row) @(negedge clk);
    chk(n_fe_row == 0, "row front-end setting not applied before its row");
    @(negedge clk);
    chk(rf_switch == ROW_FE.sw && att1 == ROW_FE.att1 && att2 == ROW_FE.att2,
        "row front-end setting applied");
    rd('h007, d); chk(d[3] && d[0], $sformatf("status shows row front end %b", d[3:0]));
    repeat (150) @(negedge clk);
    pulse_extr();
    while (!cycle_done) @(negedge clk);
    repeat (10) @(negedge clk);
    rd('h007, d); chk(d[1] && d[2], $sformatf("overrun and late flags %b", d[2:0]));
    chk(!d[3] && rf_switch == 4'd12 && att1[0] == 5'd12 && att1[3] == 5'd9,
        "front end back to the registers after the pass");
    rd('h800 + 8 * 2 + 6, d); chk(d[31], "row 2 reported late");
    rd('h800 + 8 * 2 + 7, d); chk(d == 1, "row 2 tagged with cycle 1");
    rd('h800 + 8 * 0 + 6, d); chk(!d[31], "row 0 not late");
    wr('h007, 0);
    rd('h007, d); chk(d[2:1] == 2'b00, "status cleared");
    rd('h006, d); chk(d == 2, "two cycles completed");

    $display("parallel=%0d extr_windows=%0d arm_waits=%0d simultaneous_results=%0d cycles=%0d",
             n_parallel, n_trig_extr_win, n_arm_wait, n_both_res, n_cycle_done);
    chk(n_parallel > 0, "both engines integrating at once");
    chk(n_trig_extr_win > 0, "windows timed from extraction");
    chk(n_arm_wait > 0, "sequencer waited for a busy engine");
    chk(n_both_res > 0, "two results in the same clock");
    chk(n_cycle_done == 2, "cycle done pulses");
    chk(n_fe_row > 0, "a row set the front end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
