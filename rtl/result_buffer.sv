// result_buffer: measurement results exported to the control system.
//
// Each finished measurement is written at the row of its table entry, so the
// control system finds the result of table row n at result row n after the
// injection cycle.  A result row is read as eight host words:
//   0: I[31:0]   1: I[ACC_W-1:32] sign extended
//   2: Q[31:0]   3: Q[ACC_W-1:32] sign extended
//   4: amplitude[31:0]   5: amplitude[AMP_W-1:32]
//   6: [31] late flag, [15:0] phase (full circle = 65536)
//   7: number of the injection cycle that produced it (cycle counter value)
// Port A writes a whole result row in one clock.  Port B is the host: word
// address {row, word}; `b_rdata` follows the address by one clock.
// A results buffer in the shared memory is the measurement system's; its layout
// and the cycle tag are this design's.
module result_buffer
  import charge_pkg::*;
#(
  parameter int unsigned DEPTH = TBL_DEPTH
) (
  input  logic                       clk,
  input  logic                       a_we,
  input  logic [$clog2(DEPTH)-1:0]   a_row,
  input  result_t                    a_res,
  input  logic [HOST_DW-1:0]         a_cycle,
  input  logic [$clog2(DEPTH)+2:0]   b_addr,
  output logic [HOST_DW-1:0]         b_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  result_t           mem [DEPTH];
  logic [HOST_DW-1:0] cyc [DEPTH];

  result_t            rd;
  logic [HOST_DW-1:0] rd_cyc;
  logic [2:0]         wsel;

  always_ff @(posedge clk) begin
    if (a_we) begin
      mem[a_row] <= a_res;
      cyc[a_row] <= a_cycle;
    end
    rd     <= mem[b_addr[AW+2:3]];
    rd_cyc <= cyc[b_addr[AW+2:3]];
    wsel   <= b_addr[2:0];
  end

  logic signed [2*HOST_DW-1:0] i64, q64;
  logic [2*HOST_DW-1:0]        a64;
  assign i64 = (2*HOST_DW)'(rd.i);
  assign q64 = (2*HOST_DW)'(rd.q);
  assign a64 = (2*HOST_DW)'(rd.amp);

  always_comb begin
    unique case (wsel)
      3'd0: b_rdata = i64[HOST_DW-1:0];
      3'd1: b_rdata = i64[2*HOST_DW-1:HOST_DW];
      3'd2: b_rdata = q64[HOST_DW-1:0];
      3'd3: b_rdata = q64[2*HOST_DW-1:HOST_DW];
      3'd4: b_rdata = a64[HOST_DW-1:0];
      3'd5: b_rdata = a64[2*HOST_DW-1:HOST_DW];
      3'd6: b_rdata = {rd.late, {(HOST_DW-1-ANG_W){1'b0}}, rd.phase};
      default: b_rdata = rd_cyc;
    endcase
  end

endmodule
