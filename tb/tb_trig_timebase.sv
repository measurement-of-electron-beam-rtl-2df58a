// tb_trig_timebase: pulses on both trigger inputs; checks the three-clock edge
// latency, that each pulse gives exactly one edge, the time counts since each
// pulse, saturation, and the "seen in this cycle" flags (a linac pulse clears
// the extraction flag).
module tb_trig_timebase;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]       trig_raw, edge_o, seen_o;
  logic [1:0][7:0]  t_o;
  trig_timebase #(.T_W(8)) dut (.clk, .rst_n, .trig_raw, .edge_o, .seen_o, .t_o);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Raise source k's input for `len` clocks at a negedge and check the edge
  // appears exactly three clocks after the rise.
  task automatic pulse(int k, int len);
    int lat;
    @(negedge clk) trig_raw[k] = 1'b1;
    lat = 0;
    do begin @(negedge clk); lat++; if (lat == len) trig_raw[k] = 1'b0; end
    while (!edge_o[k] && lat < 10);
    chk(lat == 2, $sformatf("edge latency src %0d = %0d", k, lat + 1));
    repeat (len + 2) @(negedge clk) chk(!edge_o[k], "single edge");
    trig_raw[k] = 1'b0;
  endtask

  int t0;
  initial begin
    trig_raw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(seen_o == 2'b00, "nothing seen after reset");
    chk(t_o[0] == 8'hff && t_o[1] == 8'hff, "counters saturated after reset");
    pulse(TRIG_LINAC, 4);
    chk(seen_o == 2'b01, "linac seen");
    t0 = t_o[0];
    repeat (10) @(negedge clk);
    chk(t_o[0] == t0 + 10, "linac time counts");
    pulse(TRIG_EXTR, 1);
    chk(seen_o == 2'b11, "extraction seen");
    chk(t_o[1] == 8'd2, $sformatf("extraction time %0d", t_o[1]));
    repeat (300) @(negedge clk);
    chk(t_o[0] == 8'hff && t_o[1] == 8'hff, "saturate");
    pulse(TRIG_LINAC, 2);
    chk(seen_o == 2'b01, "new cycle clears extraction flag");
    chk(t_o[1] == 8'hff, "extraction time unaffected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
