// tb_iq_mixer: random samples and oscillator values; each output pair is compared,
// one clock later, with floor(x*cos/32768 + 1/2) and floor(-x*sin/32768 + 1/2)
// computed in real arithmetic.
module tb_iq_mixer;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [15:0] x, lc, ls, i_o, q_o;
  iq_mixer dut (.clk, .rst_n, .x, .lo_cos(lc), .lo_sin(ls), .i_o, .q_o);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ei, eq;
  initial begin
    x = 0; lc = 0; ls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      x  = 16'($urandom);
      lc = 16'(int'($urandom_range(0, 65534)) - 32767);
      ls = 16'(int'($urandom_range(0, 65534)) - 32767);
      if (n == 0) begin x = -16'sd32768; lc = 16'sd32767; ls = -16'sd32767; end
      ei = $rtoi($floor(real'(x) * real'(lc) / 32768.0 + 0.5));
      eq = $rtoi($floor(-real'(x) * real'(ls) / 32768.0 + 0.5));
      @(negedge clk);
      checks++;
      if (int'(i_o) != ei || int'(q_o) != eq) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d c=%0d s=%0d got %0d,%0d exp %0d,%0d", x, lc, ls, i_o, q_o, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
