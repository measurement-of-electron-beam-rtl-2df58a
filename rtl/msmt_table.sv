// msmt_table: block RAM holding the list of measurements of an injection cycle.
//
// The control system writes the measurement schedule into this RAM through the
// shared memory; the sequencer reads it row by row during each injection cycle.
// One row describes one measurement: trigger source, input channel, DSP engine,
// numerical gain, window start and stop in sample clocks, and optionally a
// setting of the analog front end (crossbar switch and attenuators) to apply
// when the measurement is set up.  A row occupies four host words:
//   word 0: [31] trigger (0 linac, 1 extraction)  [30:29] channel
//           [28] DSP engine  [27:24] gain  [23:0] window start
//   word 1: [23:0] window stop
//   word 2: [31] apply front-end setting  [23:4] attenuator 1 (5 bits per
//           channel, channel 0 lowest)  [3:0] crossbar switch
//   word 3: [19:0] attenuator 2
//
// Port A (host): word address {row, word}, write with `a_we`; `a_rdata` returns
// the addressed word one clock later.  Port B (sequencer): row address, `b_row`
// returns the unpacked row one clock later.  Both ports are synchronous and run
// independently, as in a true dual-port block RAM.
// A block RAM written by the control system and holding the measurement
// details, and a setup that covers trigger, delays, gain, signal, crossbar and
// attenuators, are the measurement system's; the depth and the row layout are
// this design's.
module msmt_table
  import charge_pkg::*;
#(
  parameter int unsigned DEPTH = TBL_DEPTH
) (
  input  logic                       clk,
  input  logic [$clog2(DEPTH)+1:0]   a_addr,
  input  logic                       a_we,
  input  logic [HOST_DW-1:0]         a_wdata,
  output logic [HOST_DW-1:0]         a_rdata,
  input  logic [$clog2(DEPTH)-1:0]   b_addr,
  output msmt_t                      b_row
);

  localparam int unsigned AW = $clog2(DEPTH);

  localparam int unsigned FE_W = 5 * NUM_CH;

  logic [HOST_DW-1:0] w0 [DEPTH];
  logic [TIME_W-1:0]  w1 [DEPTH];
  logic [FE_W+4:0]    w2 [DEPTH];   // {apply, att1, switch}
  logic [FE_W-1:0]    w3 [DEPTH];

  logic [AW-1:0] a_row;
  assign a_row = a_addr[AW+1:2];

  // Port A: host read/write
  always_ff @(posedge clk) begin
    if (a_we && a_addr[1:0] == 2'd0) w0[a_row] <= a_wdata;
    if (a_we && a_addr[1:0] == 2'd1) w1[a_row] <= a_wdata[TIME_W-1:0];
    if (a_we && a_addr[1:0] == 2'd2) w2[a_row] <= {a_wdata[31], a_wdata[FE_W+3:0]};
    if (a_we && a_addr[1:0] == 2'd3) w3[a_row] <= a_wdata[FE_W-1:0];
    unique case (a_addr[1:0])
      2'd0: a_rdata <= w0[a_row];
      2'd1: a_rdata <= HOST_DW'(w1[a_row]);
      2'd2: a_rdata <= {w2[a_row][FE_W+4], {(HOST_DW-FE_W-5){1'b0}}, w2[a_row][FE_W+3:0]};
      default: a_rdata <= HOST_DW'(w3[a_row]);
    endcase
  end

  // Port B: sequencer read
  logic [HOST_DW-1:0] b_w0;
  logic [TIME_W-1:0]  b_w1;
  logic [FE_W+4:0]    b_w2;
  logic [FE_W-1:0]    b_w3;
  always_ff @(posedge clk) begin
    b_w0 <= w0[b_addr];
    b_w1 <= w1[b_addr];
    b_w2 <= w2[b_addr];
    b_w3 <= w3[b_addr];
  end

  always_comb begin
    b_row.trig    = trig_sel_e'(b_w0[31]);
    b_row.sig     = b_w0[30:29];
    b_row.dsp     = b_w0[28];
    b_row.gain    = b_w0[27:24];
    b_row.start   = b_w0[23:0];
    b_row.stop    = b_w1;
    b_row.fe_set  = b_w2[FE_W+4];
    b_row.fe.att1 = b_w2[FE_W+3:4];
    b_row.fe.sw   = b_w2[3:0];
    b_row.fe.att2 = b_w3;
  end

endmodule
