// charge_top: FPGA firmware measuring beam charge and RF phase from four striplines.
//
// Four stripline pickups (linac-to-booster transfer line TL1, booster SY,
// booster-to-storage-ring transfer line TL2, storage ring SR) feed, through
// narrow 352.2 MHz band-pass filters and the analog front end of a BPM
// electronics, four 12-bit ADCs sampling at 108 MHz.  The beam signal
// appears as an IF near 28 MHz.  This firmware mixes it down with a free-running
// local oscillator and integrates it over programmable windows timed from the
// linac trigger or the booster extraction pulse.  The integrated amplitude is
// proportional to the charge passing the pickup; comparing locations gives the
// transfer efficiencies, and comparing the phases of two simultaneous
// measurements gives the relative beam phase.
//
// Structure:
//   trig_timebase   time since each trigger
//   nco             shared local oscillator
//   dsp_eng x2      channel select, gain, mixer, window, integrator, CORDIC
//   msmt_table      measurement schedule written by the control system
//   msmt_sequencer  hands table rows to the engines, files results
//   result_buffer   results for the control system
//   host_regs       configuration registers and address decode
//
// Interface: one clock, the ADC sample clock; `adc` carries one new sample per
// channel per clock.  `trig_linac`/`trig_extr` are asynchronous pulses.  The host
// bus is a simple synchronous word bus (see host_regs for the map) with one
// clock of read latency.  `rf_switch`, `att1`, `att2` drive the analog front
// end's crossbar switch and attenuators, which are outside this design.  They
// follow the host registers, except during a pass after a table row that
// carries its own setting (see msmt_sequencer).
// `cycle_done` pulses when an injection cycle's table has completed.
// The processing chain, its two engines and the sequenced schedule follow the
// measurement system; the interfaces, widths and the hardwired sequencer are
// this design's.
module charge_top
  import charge_pkg::*;
#(
  parameter int unsigned CORDIC_ITER = 20
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ADC samples, channel 0..3 = TL1, SY, TL2, SR
  input  logic signed [NUM_CH-1:0][ADC_W-1:0] adc,
  // timing pulses
  input  logic                          trig_linac,
  input  logic                          trig_extr,
  // host bus (shared memory)
  input  logic [HOST_AW-1:0]            host_addr,
  input  logic                          host_we,
  input  logic [HOST_DW-1:0]            host_wdata,
  output logic [HOST_DW-1:0]            host_rdata,
  // analog front end controls
  output logic [3:0]                    rf_switch,
  output logic [NUM_CH-1:0][4:0]        att1,
  output logic [NUM_CH-1:0][4:0]        att2,
  // status
  output logic                          cycle_done
);

  // ---- timing ----
  logic [1:0]             trig_edge, seen;
  logic [1:0][TIME_W-1:0] t;
  trig_timebase #(.T_W(TIME_W)) u_tb (
    .clk, .rst_n, .trig_raw({trig_extr, trig_linac}),
    .edge_o(trig_edge), .seen_o(seen), .t_o(t)
  );

  // ---- configuration ----
  logic                enable, status_clr, tbl_we;
  logic [TBL_AW:0]     num;
  logic [PHASE_W-1:0]  nco_inc;
  logic [HOST_DW-1:0]  cycles, tbl_rdata, res_rdata;
  logic                busy, overrun, late, fe_row;
  fe_cfg_t             reg_fe, fe;

  host_regs u_regs (
    .clk, .rst_n, .host_addr, .host_we, .host_wdata, .host_rdata,
    .enable_o(enable), .num_o(num), .nco_inc_o(nco_inc), .switch_o(reg_fe.sw),
    .att1_o(reg_fe.att1), .att2_o(reg_fe.att2), .status_clr_o(status_clr),
    .cycles_i(cycles), .status_i({fe_row, late, overrun, busy}),
    .tbl_we_o(tbl_we), .tbl_rdata_i(tbl_rdata), .res_rdata_i(res_rdata)
  );

  // ---- local oscillator ----
  logic signed [NCO_W-1:0] lo_cos, lo_sin;
  nco #(.P_W(PHASE_W), .A_W(LUT_AW), .D_W(NCO_W)) u_nco (
    .clk, .rst_n, .inc(nco_inc), .cos_o(lo_cos), .sin_o(lo_sin)
  );

  // ---- measurement table ----
  logic [TBL_AW-1:0] tbl_addr;
  msmt_t             tbl_row;
  msmt_table #(.DEPTH(TBL_DEPTH)) u_table (
    .clk, .a_addr(host_addr[TBL_AW+1:0]), .a_we(tbl_we), .a_wdata(host_wdata),
    .a_rdata(tbl_rdata), .b_addr(tbl_addr), .b_row(tbl_row)
  );

  // ---- sequencer and engines ----
  logic [NUM_DSP-1:0]           arm_valid, arm_ready, res_valid, res_ready;
  arm_t                         arm;
  tagged_result_t [NUM_DSP-1:0] res;
  logic                         rb_we;
  logic [TBL_AW-1:0]            rb_row;
  result_t                      rb_res;

  msmt_sequencer #(.N_DSP(NUM_DSP), .DEPTH(TBL_DEPTH)) u_seq (
    .clk, .rst_n, .enable, .num, .cycle_start(trig_edge[TRIG_LINAC]), .status_clr, .reg_fe,
    .tbl_addr, .tbl_row, .arm_valid, .arm, .arm_ready, .res_valid, .res, .res_ready,
    .rb_we, .rb_row, .rb_res, .cycles_o(cycles), .busy_o(busy), .overrun_o(overrun),
    .late_o(late), .fe_o(fe), .fe_row_o(fe_row)
  );

  assign rf_switch = fe.sw;
  assign att1      = fe.att1;
  assign att2      = fe.att2;

  for (genvar k = 0; k < NUM_DSP; k++) begin : g_eng
    dsp_eng #(.CORDIC_ITER(CORDIC_ITER)) u_eng (
      .clk, .rst_n, .adc, .lo_cos, .lo_sin, .seen, .t,
      .arm_valid(arm_valid[k]), .arm, .arm_ready(arm_ready[k]),
      .res_valid(res_valid[k]), .res(res[k]), .res_ready(res_ready[k])
    );
  end

  // ---- results ----
  result_buffer #(.DEPTH(TBL_DEPTH)) u_res (
    .clk, .a_we(rb_we), .a_row(rb_row), .a_res(rb_res), .a_cycle(cycles),
    .b_addr(host_addr[TBL_AW+2:0]), .b_rdata(res_rdata)
  );

  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign cycle_done = busy_q && !busy;

endmodule
