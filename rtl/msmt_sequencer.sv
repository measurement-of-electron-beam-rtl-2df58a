// msmt_sequencer: schedules the measurements of each injection cycle.
//
// Many measurements are scheduled during one injection cycle, alternating
// between the two DSP engines, e.g. the booster signal on one engine while the
// storage ring is measured on the other.  The sequencer sets up each one from the
// measurement table and files each result in the result buffer.  It stays out
// of the signal path.
//
// How it works: on a linac trigger (`cycle_start`), if enabled, it walks table
// rows 0..num-1 in order.  For each row it waits until the row's engine is idle,
// then hands it the row (arm handshake).  An engine armed early simply waits for
// its window; so rows must be listed so that each engine's windows follow one
// another in time, as in the reference schedule.  When every row has been handed
// out and both engines are idle again, the cycle counter increments.  Results are
// taken from the engines with a fixed priority (engine 0 first), one per clock,
// and written at their table row.
//
// Interface: `tbl_addr`/`tbl_row` read the table with one clock latency.
// `arm_valid[k]` with the shared `arm` bus offers a setup to engine k, taken when
// `arm_ready[k]`.  `res_valid[k]`/`res[k]`/`res_ready[k]` collect results.
// `overrun_o` is set when a linac trigger arrives before the previous cycle's
// table has finished; that trigger is then ignored.  `late_o` is set when a
// result reports that its window had already started when it was armed.  Both
// are sticky until `status_clr`.
// Front end: `fe_o` drives the analog front end's crossbar switch and
// attenuators.  Outside a pass it follows the host registers (`reg_fe`).  When
// a row whose `fe_set` bit is set is handed out, its own setting is applied and
// held until another such row is handed out or the pass ends.  The front end is
// shared by both engines, so a row that changes it affects any window the other
// engine has open at that moment; schedules should change it only between
// windows.
// The `arm` bus carries the whole table row; the engines use only the fields
// they need (the front-end fields are consumed here), and synthesis drops the
// rest, which shows up as unused outputs when this block is synthesised alone.
// Timing: a row is handed out three clocks after the previous one at the
// earliest (table read, issue).  A row's front-end setting appears on `fe_o`
// the clock after the row is handed out.
// In the original system this sequencing is the program of a small soft
// processor; here the same duties are a hardwired state machine.  Its sequencing
// rule, priority and status flags are this design's.
module msmt_sequencer
  import charge_pkg::*;
#(
  parameter int unsigned N_DSP = NUM_DSP,
  parameter int unsigned DEPTH = TBL_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable,
  input  logic [$clog2(DEPTH):0]        num,
  input  logic                          cycle_start,
  input  logic                          status_clr,
  input  fe_cfg_t                       reg_fe,
  // measurement table
  output logic [$clog2(DEPTH)-1:0]      tbl_addr,
  input  msmt_t                         tbl_row,
  // engines
  output logic [N_DSP-1:0]              arm_valid,
  output arm_t                          arm,
  input  logic [N_DSP-1:0]              arm_ready,
  input  logic [N_DSP-1:0]              res_valid,
  input  tagged_result_t [N_DSP-1:0]    res,
  output logic [N_DSP-1:0]              res_ready,
  // result buffer
  output logic                          rb_we,
  output logic [$clog2(DEPTH)-1:0]      rb_row,
  output result_t                       rb_res,
  // status
  output logic [HOST_DW-1:0]            cycles_o,
  output logic                          busy_o,
  output logic                          overrun_o,
  output logic                          late_o,
  // analog front end setting
  output fe_cfg_t                       fe_o,
  output logic                          fe_row_o    // a row's own setting is applied
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {Q_IDLE, Q_FETCH, Q_ISSUE, Q_DRAIN} state_e;
  state_e        state;
  logic [AW:0]   idx;
  logic          eng;     // engine of the row being issued
  logic          take;    // current row handed over this clock

  assign tbl_addr = idx[AW-1:0];
  assign busy_o   = (state != Q_IDLE);
  assign eng      = tbl_row.dsp;
  assign arm.m    = tbl_row;
  assign arm.idx  = idx[AW-1:0];

  always_comb begin
    arm_valid = '0;
    if (state == Q_ISSUE) arm_valid[eng] = 1'b1;
  end
  assign take = (state == Q_ISSUE) && arm_ready[eng];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= Q_IDLE;
      idx       <= '0;
      cycles_o  <= '0;
      overrun_o <= 1'b0;
    end else begin
      if (status_clr) overrun_o <= 1'b0;
      unique case (state)
        Q_IDLE: if (cycle_start && enable && num != '0) begin
          idx   <= '0;
          state <= Q_FETCH;
        end
        Q_FETCH: state <= Q_ISSUE;
        Q_ISSUE: if (take) begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == num) state <= Q_DRAIN;
          else                   state <= Q_FETCH;
        end
        Q_DRAIN: if (&arm_ready) begin
          cycles_o <= cycles_o + 1'b1;
          state    <= Q_IDLE;
        end
        default: state <= Q_IDLE;
      endcase
      if (cycle_start && state != Q_IDLE) overrun_o <= 1'b1;
    end
  end

  // ---- front-end setting: registers, or the last row that sets its own ----
  fe_cfg_t fe_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe_row_o <= 1'b0;
      fe_q     <= '0;
    end else if (take && tbl_row.fe_set) begin
      fe_row_o <= 1'b1;
      fe_q     <= tbl_row.fe;
    end else if (state == Q_IDLE) begin
      fe_row_o <= 1'b0;
    end
  end
  assign fe_o = fe_row_o ? fe_q : reg_fe;

  // ---- result collection: fixed priority, lowest engine first ----
  always_comb begin
    res_ready = '0;
    rb_we     = 1'b0;
    rb_row    = res[0].idx;
    rb_res    = res[0].r;
    for (int k = N_DSP - 1; k >= 0; k--) begin
      if (res_valid[k]) begin
        res_ready = '0;
        res_ready[k] = 1'b1;
        rb_we  = 1'b1;
        rb_row = res[k].idx;
        rb_res = res[k].r;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  late_o <= 1'b0;
    else if (status_clr)         late_o <= 1'b0;
    else if (rb_we && rb_res.late) late_o <= 1'b1;
  end

  // At most one engine is offered a setup at a time, and only while issuing.
  always_comb begin
    if (rst_n) a_one_arm: assert ($countones(arm_valid) <= 1);
  end

endmodule
