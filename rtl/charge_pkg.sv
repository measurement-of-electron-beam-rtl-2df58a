// charge_pkg: types and constants shared by the beam-charge measurement firmware.
//
// The firmware integrates the RF amplitude of four stripline signals, sampled by
// four 12-bit ADCs at 108 MHz, over programmable time windows that open a fixed
// delay after either the linac trigger or the booster extraction trigger.  The
// numbers below that come from the measurement system itself are the ADC width
// (12 bit), the four input channels, the two DSP engines and the 108 MHz sample
// rate.  All other widths (time counters, accumulators, table depth) are choices
// of this implementation, picked so that every measurement of the reference
// injection schedule (windows up to about 39 ms after a trigger) fits.
package charge_pkg;

  // ---- sizes taken from the measurement system ----
  localparam int ADC_W     = 12;   // ADC resolution
  localparam int NUM_CH    = 4;    // TL1, booster (SY), TL2, storage ring (SR)
  localparam int NUM_DSP   = 2;    // two DSP engines run measurements in parallel
  localparam int FS_KHZ    = 108000; // ADC sample rate, kHz

  // ---- implementation choices ----
  localparam int TIME_W    = 24;   // trigger-relative time, in sample clocks (155 ms max)
  localparam int GAIN_W    = 4;    // numerical gain, unsigned integer factor 0..15
  localparam int NCO_W     = 16;   // NCO sine/cosine amplitude, signed
  localparam int PHASE_W   = 32;   // NCO phase accumulator
  localparam int LUT_AW    = 10;   // NCO quarter-wave table address bits
  localparam int SAMP_W    = ADC_W + GAIN_W;          // sample after gain (signed)
  localparam int MIX_W     = SAMP_W;                  // mixer output after >>> (NCO_W-1)
  localparam int ACC_W     = MIX_W + TIME_W;          // integrator width, never overflows
  localparam int ANG_W     = 16;   // phase result: full circle = 2**ANG_W
  localparam int AMP_W     = ACC_W + 1;               // amplitude result
  localparam int TBL_DEPTH = 256;  // measurement table entries
  localparam int TBL_AW    = $clog2(TBL_DEPTH);
  localparam int HOST_AW   = 12;   // host word address
  localparam int HOST_DW   = 32;   // host data width

  // Trigger sources.
  typedef enum logic [0:0] {
    TRIG_LINAC = 1'b0,   // linac trigger pulse (start of an injection cycle)
    TRIG_EXTR  = 1'b1    // booster extraction pulse
  } trig_sel_e;

  // Analog front-end setting: crossbar switch and two attenuators per channel.
  typedef struct packed {
    logic [3:0]              sw;    // crossbar switch setting 0..15
    logic [NUM_CH-1:0][4:0]  att1;  // first attenuator, channel 0 in [4:0]
    logic [NUM_CH-1:0][4:0]  att2;  // second attenuator
  } fe_cfg_t;

  // One measurement descriptor (one row of the measurement table).
  typedef struct packed {
    logic                   fe_set; // apply this row's front-end setting when issued
    fe_cfg_t                fe;     // front-end setting of this row
    trig_sel_e              trig;   // trigger the window is timed from
    logic [1:0]             sig;    // input channel 0..3 = TL1, SY, TL2, SR
    logic                   dsp;    // DSP engine that runs it
    logic [GAIN_W-1:0]      gain;   // numerical gain
    logic [TIME_W-1:0]      start;  // window opens this many clocks after the trigger
    logic [TIME_W-1:0]      stop;   // window closes this many clocks after the trigger
  } msmt_t;

  // Setup handed from the sequencer to a DSP engine.
  typedef struct packed {
    msmt_t                  m;
    logic [TBL_AW-1:0]      idx;    // table row, used as the result address
  } arm_t;

  // One measurement result.
  typedef struct packed {
    logic                   late;   // window start had already passed when armed
    logic [ANG_W-1:0]       phase;  // atan2(Q, I), full circle = 2**ANG_W
    logic [AMP_W-1:0]       amp;    // sqrt(I^2 + Q^2)
    logic signed [ACC_W-1:0] q;     // integrated quadrature component
    logic signed [ACC_W-1:0] i;     // integrated in-phase component
  } result_t;

  typedef struct packed {
    result_t                r;
    logic [TBL_AW-1:0]      idx;
  } tagged_result_t;

  // ---- host address map (word addresses) ----
  localparam logic [HOST_AW-1:0] A_CTRL     = 12'h000; // [0] enable
  localparam logic [HOST_AW-1:0] A_NUM      = 12'h001; // number of table rows to run
  localparam logic [HOST_AW-1:0] A_NCO      = 12'h002; // NCO phase increment
  localparam logic [HOST_AW-1:0] A_SWITCH   = 12'h003; // crossbar switch setting 0..15
  localparam logic [HOST_AW-1:0] A_ATT1     = 12'h004; // attenuator 1, 5 bits per channel
  localparam logic [HOST_AW-1:0] A_ATT2     = 12'h005; // attenuator 2, 5 bits per channel
  localparam logic [HOST_AW-1:0] A_CYCLES   = 12'h006; // completed injection cycles (RO)
  localparam logic [HOST_AW-1:0] A_STATUS   = 12'h007; // [0] busy [1] overrun [2] late [3] row front end
  localparam logic [1:0]         SEG_REGS   = 2'b00;   // 0x000-0x3FF registers
  localparam logic [1:0]         SEG_TABLE  = 2'b01;   // 0x400-0x7FF table, 4 words/row
  // 0x800-0xFFF results, 8 words per row

  // Reset values of the configuration (from the reference configuration screen).
  localparam logic [3:0] SWITCH_RESET = 4'd12;
  localparam logic [4:0] ATT_RESET    = 5'd10;
  // 28.0315 MHz / 108 MHz * 2**32
  localparam logic [PHASE_W-1:0] NCO_INC_RESET = 32'(64'd28031500 * (64'd1 << 32) / 64'd108000000);

endpackage
