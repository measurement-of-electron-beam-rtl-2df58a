// trig_timebase: time since the linac trigger and since the booster extraction pulse.
//
// Each measurement window is placed at a programmable delay after one of two
// timing pulses: the linac trigger, which starts an injection cycle, or the
// booster extraction pulse.  This block keeps, for each source, a saturating count
// of sample clocks since its last pulse, and a flag saying whether that pulse has
// occurred in the current injection cycle.  A linac pulse opens a new cycle: it
// clears the extraction flag, so a window timed from extraction waits for the
// extraction of the same cycle.
//
// Interface: `trig_raw` are the two pulse inputs, asynchronous and active high
// (index 0 linac, 1 extraction).  They pass a two-flop synchroniser and a rising
// edge detector.  `edge_o` pulses for one clock per pulse; in that clock's next
// state `t_o` of that source is 0 and counts up by one per clock from there,
// holding at its maximum.  `seen_o` goes high with `t_o` = 0.
// Latency from a pulse's rising edge to `edge_o` is three clocks.
// The synchroniser, the edge detection and the "seen in this cycle" rule are
// choices of this design; the two trigger sources are the measurement system's.
module trig_timebase
  import charge_pkg::*;
#(
  parameter int unsigned T_W = TIME_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           trig_raw,
  output logic [1:0]           edge_o,
  output logic [1:0]           seen_o,
  output logic [1:0][T_W-1:0]  t_o
);

  logic [1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= trig_raw;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign edge_o = s2 & ~s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_o <= '0;
      t_o    <= '{default: '1};
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (edge_o[k])           t_o[k] <= '0;
        else if (t_o[k] != '1)   t_o[k] <= t_o[k] + 1'b1;
      end
      if (edge_o[TRIG_LINAC]) begin
        seen_o[TRIG_LINAC] <= 1'b1;
        seen_o[TRIG_EXTR]  <= 1'b0;
      end
      if (edge_o[TRIG_EXTR]) seen_o[TRIG_EXTR] <= 1'b1;
    end
  end

endmodule
