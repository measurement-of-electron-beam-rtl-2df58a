// host_regs: configuration registers and address decode of the shared memory.
//
// The control system configures the firmware and collects its results through
// one memory-mapped window.  This block holds the configuration registers,
// forwards table and result accesses to their RAMs, and returns read data.
//
// Word address map (HOST_AW = 12 bits):
//   0x000 CTRL    [0] enable: run the table on every linac trigger
//   0x001 NUM     number of table rows to run per injection cycle (0..TBL_DEPTH)
//   0x002 NCO     local oscillator phase increment, f = NCO/2**32 * f_clk
//   0x003 SWITCH  [3:0] RF crossbar switch setting 0..15
//   0x004 ATT1    first RF attenuator, 5 bits per channel: [4:0] A ... [19:15] D
//   0x005 ATT2    second RF attenuator, same layout
//   0x006 CYCLES  completed injection cycles (read only)
//   0x007 STATUS  [0] busy [1] overrun [2] late [3] front end set by a table
//                 row (read; any write clears [2:1])
//   0x400-0x7FF   measurement table, four words per row (see msmt_table)
//   0x800-0xFFF   results, eight words per row (see result_buffer)
// Reset values: switch 12, attenuators 10 on every channel, NCO 28.0315 MHz at a
// 108 MHz clock, disabled, NUM 0.
//
// Timing: a write takes effect at the clock edge that samples `host_we`.  Read
// data for the address presented in one clock appears in `host_rdata` in the
// next clock, for every region.
// A register interface in a shared memory, and the switch, attenuator and NCO
// settings with their reset values, are the measurement system's; the address
// map and bit layout are this design's.
module host_regs
  import charge_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // host bus
  input  logic [HOST_AW-1:0]    host_addr,
  input  logic                  host_we,
  input  logic [HOST_DW-1:0]    host_wdata,
  output logic [HOST_DW-1:0]    host_rdata,
  // configuration
  output logic                  enable_o,
  output logic [TBL_AW:0]       num_o,
  output logic [PHASE_W-1:0]    nco_inc_o,
  output logic [3:0]            switch_o,
  output logic [NUM_CH-1:0][4:0] att1_o,
  output logic [NUM_CH-1:0][4:0] att2_o,
  output logic                  status_clr_o,
  // status
  input  logic [HOST_DW-1:0]    cycles_i,
  input  logic [3:0]            status_i,
  // measurement table port
  output logic                  tbl_we_o,
  input  logic [HOST_DW-1:0]    tbl_rdata_i,
  // result buffer port
  input  logic [HOST_DW-1:0]    res_rdata_i
);

  logic is_reg, is_tbl;
  assign is_reg = (host_addr[HOST_AW-1 -: 2] == SEG_REGS);
  assign is_tbl = (host_addr[HOST_AW-1 -: 2] == SEG_TABLE);

  assign tbl_we_o     = host_we && is_tbl;
  assign status_clr_o = host_we && (host_addr == A_STATUS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable_o  <= 1'b0;
      num_o     <= '0;
      nco_inc_o <= NCO_INC_RESET;
      switch_o  <= SWITCH_RESET;
      att1_o    <= '{default: ATT_RESET};
      att2_o    <= '{default: ATT_RESET};
    end else if (host_we && is_reg) begin
      unique case (host_addr)
        A_CTRL:   enable_o  <= host_wdata[0];
        A_NUM:    num_o     <= (host_wdata > HOST_DW'(TBL_DEPTH)) ? (TBL_AW+1)'(TBL_DEPTH)
                                                                   : host_wdata[TBL_AW:0];
        A_NCO:    nco_inc_o <= host_wdata;
        A_SWITCH: switch_o  <= host_wdata[3:0];
        A_ATT1:   att1_o    <= host_wdata[5*NUM_CH-1:0];
        A_ATT2:   att2_o    <= host_wdata[5*NUM_CH-1:0];
        default: ;
      endcase
    end
  end

  // Register reads are registered here so that all regions answer one clock
  // after the address, like the RAMs.
  logic [HOST_DW-1:0] reg_rdata;
  logic [1:0]         seg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rdata <= '0;
      seg_q     <= '0;
    end else begin
      seg_q <= host_addr[HOST_AW-1 -: 2];
      unique case (host_addr)
        A_CTRL:   reg_rdata <= HOST_DW'(enable_o);
        A_NUM:    reg_rdata <= HOST_DW'(num_o);
        A_NCO:    reg_rdata <= nco_inc_o;
        A_SWITCH: reg_rdata <= HOST_DW'(switch_o);
        A_ATT1:   reg_rdata <= HOST_DW'(att1_o);
        A_ATT2:   reg_rdata <= HOST_DW'(att2_o);
        A_CYCLES: reg_rdata <= cycles_i;
        A_STATUS: reg_rdata <= HOST_DW'(status_i);
        default:  reg_rdata <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (seg_q)
      SEG_REGS:  host_rdata = reg_rdata;
      SEG_TABLE: host_rdata = tbl_rdata_i;
      default:   host_rdata = res_rdata_i;
    endcase
  end

endmodule
