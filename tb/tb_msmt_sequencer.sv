// tb_msmt_sequencer: the sequencer against a table model and two behavioural
// engine models that stay busy for random times and then offer a result.
// Checked: rows are handed out in table order, each to the engine its row names,
// with the row's contents and index; an engine is never handed a row while busy;
// every result lands in the result buffer port once, at its row, with its data;
// engine 0 wins when both offer a result in the same clock (made to happen);
// the cycle counter and busy flag; a disabled sequencer ignores triggers; a
// trigger during a pass sets the sticky overrun flag; late results set the
// sticky late flag; status clear resets both.  The front-end output follows
// the registers outside a pass and takes a row's own setting, from the clock
// after that row is handed out until the next such row or the end of the pass.
// Checked every clock against a model.
module tb_msmt_sequencer;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                      enable, cycle_start, status_clr;
  logic [TBL_AW:0]           num;
  logic [TBL_AW-1:0]         tbl_addr;
  msmt_t                     tbl_row;
  logic [1:0]                arm_valid, arm_ready, res_valid, res_ready;
  arm_t                      arm;
  tagged_result_t [1:0]      res;
  logic                      rb_we;
  logic [TBL_AW-1:0]         rb_row;
  result_t                   rb_res;
  logic [31:0]               cycles_o;
  logic                      busy_o, overrun_o, late_o;
  fe_cfg_t                   reg_fe, fe_o, exp_fe;
  logic                      fe_row_o, exp_fe_row;
  int                        n_fe;

  msmt_sequencer dut (.clk, .rst_n, .enable, .num, .cycle_start, .status_clr, .reg_fe,
    .tbl_addr, .tbl_row, .arm_valid, .arm, .arm_ready, .res_valid, .res, .res_ready, .rb_we,
    .rb_row, .rb_res, .cycles_o, .busy_o, .overrun_o, .late_o, .fe_o, .fe_row_o);

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

  // ---- table model, one clock read latency ----
  msmt_t tbl [TBL_DEPTH];
  always_ff @(posedge clk) tbl_row <= tbl[tbl_addr];

  // ---- engine models ----
  int      busy_cnt [2];
  int      delay_mode;            // 0 random, 1 delays that make both engines finish together
  int      next_row;              // next row expected to be handed out
  int      n_arms, n_results, n_both;
  bit      written [TBL_DEPTH];

  function automatic result_t res_of(int row);
    result_t r;
    r = '0;
    r.i = ACC_W'(row * 1000 + 17);
    r.q = -ACC_W'(row);
    r.amp = AMP_W'(row * 3);
    r.phase = ANG_W'(row * 11);
    r.late = (row % 5 == 4);
    return r;
  endfunction

  for (genvar k = 0; k < 2; k++) begin : g_eng
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        arm_ready[k] <= 1'b1;
        res_valid[k] <= 1'b0;
        busy_cnt[k]  <= 0;
        res[k]       <= '0;
      end else begin
        if (arm_valid[k] && arm_ready[k]) begin
          arm_ready[k] <= 1'b0;
          busy_cnt[k]  <= (delay_mode == 1) ? 6 - 2 * k : int'($urandom_range(1, 30));
          res[k].idx   <= arm.idx;
          res[k].r     <= res_of(int'(arm.idx));
        end else if (!arm_ready[k] && !res_valid[k]) begin
          if (busy_cnt[k] == 0) res_valid[k] <= 1'b1;
          else busy_cnt[k] <= busy_cnt[k] - 1;
        end else if (res_valid[k] && res_ready[k]) begin
          res_valid[k] <= 1'b0;
          arm_ready[k] <= 1'b1;
        end
      end
    end
  end

  // ---- monitors ----
  always @(posedge clk) if (rst_n) begin
    chk(fe_row_o == exp_fe_row, "front end: row setting active");
    chk(fe_o == (exp_fe_row ? exp_fe : reg_fe), "front end setting");
    if (!busy_o) exp_fe_row = 1'b0;
    for (int k = 0; k < 2; k++) if (arm_valid[k]) begin
      if (arm_ready[k]) begin
        if (tbl[next_row].fe_set) begin
          n_fe++;
          exp_fe_row = 1'b1;
          exp_fe     = tbl[next_row].fe;
        end
        n_arms++;
        chk(int'(arm.idx) == next_row, $sformatf("row order %0d exp %0d", arm.idx, next_row));
        chk(arm.m == tbl[next_row], "row contents");
        chk(k == int'(tbl[next_row].dsp), "row to its engine");
        next_row++;
      end
    end
    if (res_valid == 2'b11) begin
      n_both++;
      chk(res_ready == 2'b01, "engine 0 has priority");
    end
    chk($countones(res_ready) <= 1, "one result per clock");
    if (rb_we) begin
      n_results++;
      chk(!written[rb_row], "result written once");
      written[rb_row] = 1'b1;
      chk(rb_res == res_of(int'(rb_row)), "result data");
    end
  end

  task automatic run_cycle(int n, int mode);
    int c0;
    delay_mode = mode;
    for (int r = 0; r < TBL_DEPTH; r++) written[r] = 1'b0;
    next_row = 0;
    num = (TBL_AW+1)'(n);
    c0 = cycles_o;
    @(negedge clk) cycle_start = 1'b1;
    @(negedge clk) cycle_start = 1'b0;
    chk(busy_o, "busy during pass");
    while (busy_o) @(negedge clk);
    repeat (40) @(negedge clk);
    chk(next_row == n, $sformatf("all rows handed out %0d/%0d", next_row, n));
    for (int r = 0; r < n; r++) chk(written[r], $sformatf("result of row %0d", r));
    chk(cycles_o == c0 + 1, "cycle counter");
  endtask

  initial begin
    enable = 0; cycle_start = 0; status_clr = 0; num = 0;
    n_arms = 0; n_results = 0; n_both = 0; delay_mode = 0; n_fe = 0;
    exp_fe_row = 1'b0; exp_fe = '0;
    reg_fe = fe_cfg_t'({$urandom, $urandom});
    for (int r = 0; r < TBL_DEPTH; r++)
      tbl[r] = msmt_t'({$urandom, $urandom, $urandom, $urandom});
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // disabled: trigger ignored
    num = 4;
    @(negedge clk) cycle_start = 1'b1;
    @(negedge clk) cycle_start = 1'b0;
    repeat (5) @(negedge clk);
    chk(!busy_o && n_arms == 0, "disabled sequencer ignores trigger");
    enable = 1;
    run_cycle(16, 0);
    // equal engine delays with alternating engines: both offer results together
    for (int r = 0; r < 8; r++) tbl[r].dsp = r[0];
    run_cycle(8, 1);
    chk(n_both > 0, "simultaneous results happened");
    reg_fe = fe_cfg_t'({$urandom, $urandom});
    run_cycle(TBL_DEPTH, 0);
    chk(late_o, "late flag set by a late result");
    // overrun
    num = 30;
    next_row = 0;
    for (int r = 0; r < TBL_DEPTH; r++) written[r] = 1'b0;
    @(negedge clk) cycle_start = 1'b1;
    @(negedge clk) cycle_start = 1'b0;
    repeat (10) @(negedge clk) cycle_start = 1'b0;
    chk(!overrun_o, "no overrun yet");
    @(negedge clk) cycle_start = 1'b1;
    @(negedge clk) cycle_start = 1'b0;
    chk(overrun_o, "overrun flagged");
    while (busy_o) @(negedge clk);
    repeat (40) @(negedge clk);
    chk(next_row == 30, "overrun trigger ignored, pass completed");
    @(negedge clk) status_clr = 1'b1;
    @(negedge clk) status_clr = 1'b0;
    chk(!overrun_o && !late_o, "status clear");
    chk(n_fe > 0, "rows applied their own front-end setting");
    $display("arms=%0d results=%0d simultaneous=%0d front-end rows=%0d",
             n_arms, n_results, n_both, n_fe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
