// tb_window_gen: drives the trigger times from a model and checks, for random
// windows on both trigger sources, that the window opens exactly one clock after
// the selected time equals start, stays open stop-start clocks, that done
// follows, that nothing opens before the trigger is seen, and the late flag.
module tb_window_gen;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                armed;
  trig_sel_e           trig;
  logic [15:0]         start, stop;
  logic [1:0]          seen;
  logic [1:0][15:0]    t;
  logic                open_o, done_o, late_o;
  window_gen #(.T_W(16)) dut (.clk, .rst_n, .armed, .trig, .start, .stop, .seen, .t,
                              .open_o, .done_o, .late_o);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // One measurement: arm at time `arm_at` (relative to trigger, -1 = before it).
  task automatic run(trig_sel_e src, int s, int e, int arm_at);
    int first_open, n_open, first_done, tt;
    bit exp_late;
    trig = src; start = 16'(s); stop = 16'(e);
    seen = '0; t = '{default: 16'hffff};
    armed = (arm_at < 0);
    first_open = -1; n_open = 0; first_done = -1;
    exp_late = (arm_at > s);
    repeat (3) @(negedge clk);
    chk(!open_o && !done_o, "nothing before trigger");
    seen[src] = 1'b1; t[src] = 0; t[!src] = 16'd7;
    for (tt = 0; tt < e + 6; tt++) begin
      if (tt == arm_at) armed = 1'b1;
      @(negedge clk);
      // outputs now describe time tt
      if (open_o) begin n_open++; if (first_open < 0) first_open = tt; end
      if (done_o && first_done < 0) first_done = tt;
      t[src]  = t[src] + 1'b1;
      t[!src] = t[!src] + 1'b1;
    end
    if (arm_at <= s) begin
      chk(first_open == s, $sformatf("open at %0d exp %0d", first_open, s));
      chk(n_open == e - s, $sformatf("open for %0d exp %0d", n_open, e - s));
    end else begin
      chk(n_open == (e > arm_at ? e - arm_at : 0), $sformatf("late open for %0d", n_open));
    end
    chk(first_done == (arm_at > e ? arm_at : e), $sformatf("done at %0d exp %0d", first_done, e));
    chk(late_o == exp_late, $sformatf("late %0d exp %0d", late_o, exp_late));
    @(negedge clk) armed = 1'b0;
    @(negedge clk);
    chk(!late_o && !open_o && !done_o, "cleared when disarmed");
  endtask

  initial begin
    armed = 0; trig = TRIG_LINAC; start = 0; stop = 0; seen = 0; t = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(TRIG_LINAC, 0, 1, -1);
    run(TRIG_EXTR, 5, 20, 2);
    run(TRIG_LINAC, 10, 12, 10);
    run(TRIG_EXTR, 10, 30, 15);   // armed late
    for (int n = 0; n < 40; n++) begin
      int s, e;
      s = $urandom_range(0, 400);
      e = s + $urandom_range(1, 400);
      run(trig_sel_e'($urandom_range(0, 1)), s, e, $urandom_range(0, 3) == 0 ? -1 : int'($urandom_range(0, s)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
