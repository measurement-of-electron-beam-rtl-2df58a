// tb_iq_integrator: random I/Q streams with random enable and clear; the sums are
// compared every clock with a running model, including near-full-scale inputs.
module tb_iq_integrator;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, en;
  logic signed [MIX_W-1:0] i_in, q_in;
  logic signed [ACC_W-1:0] acc_i, acc_q;
  iq_integrator dut (.clk, .rst_n, .clear, .en, .i_in, .q_in, .acc_i, .acc_q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint mi, mq;
  initial begin
    clear = 0; en = 0; i_in = 0; q_in = 0; mi = 0; mq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (longint'(acc_i) != mi || longint'(acc_q) != mq) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %0d,%0d exp %0d,%0d", n, acc_i, acc_q, mi, mq);
      end
      clear = ($urandom_range(0, 999) == 0);
      en    = ($urandom_range(0, 3) != 0);
      if (n < 2500) begin i_in = MIX_W'($urandom); q_in = MIX_W'($urandom); end
      else begin i_in = -(2 ** (MIX_W - 1)); q_in = 2 ** (MIX_W - 1) - 1; end
      if (clear) begin mi = 0; mq = 0; end
      else if (en) begin mi += longint'(i_in); mq += longint'(q_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
