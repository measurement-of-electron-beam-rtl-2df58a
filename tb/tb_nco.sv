// tb_nco: checks the local oscillator against sin/cos computed in real arithmetic.
// The phase accumulator is modelled independently; every output sample is
// compared, within one LSB, with round(32767*cos/sin(2*pi*(p+0.5)/4096)), p being
// the top 12 bits of the phase the oscillator held one clock earlier.  The frequency word is changed midway.
module tb_nco;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0]       inc;
  logic signed [15:0] c, s;
  nco dut (.clk, .rst_n, .inc, .cos_o(c), .sin_o(s));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(logic [31:0] ph, bit is_cos);
    real a;
    a = 2.0 * 3.14159265358979 * (real'(ph[31:20]) + 0.5) / 4096.0;
    return $rtoi(32767.0 * (is_cos ? $cos(a) : $sin(a)) + ((is_cos ? $cos(a) : $sin(a)) >= 0 ? 0.5 : -0.5));
  endfunction

  logic [31:0] ph_model, ph_prev;
  int dc, ds;
  initial begin
    inc = NCO_INC_RESET;
    ph_model = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) inc = 32'h0123_4567;
      @(posedge clk);
      ph_prev  = ph_model;
      ph_model = ph_model + inc;
      @(negedge clk);
      dc = int'(c) - ref_val(ph_prev, 1'b1);
      ds = int'(s) - ref_val(ph_prev, 1'b0);
      checks++;
      if (dc > 1 || dc < -1 || ds > 1 || ds < -1) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d cos=%0d sin=%0d ph=%h", n, c, s, ph_prev);
      end
    end
    // Reset value of the frequency word: 28.0315 MHz at 108 MHz.
    checks++;
    if ((real'(NCO_INC_RESET) / 4294967296.0 * 108.0 - 28.0315) > 1e-6 ||
        (real'(NCO_INC_RESET) / 4294967296.0 * 108.0 - 28.0315) < -1e-6) begin
      failures++;
      $display("FAIL NCO reset frequency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
