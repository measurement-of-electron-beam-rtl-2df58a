// tb_cordic_vec: random and corner-case vectors (all quadrants, on the axes,
// near full scale); amplitude is compared with sqrt(I^2+Q^2) and phase with
// atan2(Q, I) computed in real arithmetic, and the latency from start to done is
// checked to be ITER+2 clocks.
module tb_cordic_vec;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int ITER = 20;
  logic                     start, busy_o, done_o;
  logic signed [ACC_W-1:0]  i_in, q_in;
  logic [AMP_W-1:0]         amp_o;
  logic [ANG_W-1:0]         phase_o;
  cordic_vec #(.ITER(ITER)) dut (.clk, .rst_n, .start, .i_in, .q_in, .busy_o, .done_o,
                                 .amp_o, .phase_o);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;

  task automatic one(longint vi, longint vq);
    real ea, ep, da, dp;
    int lat;
    @(negedge clk);
    i_in = ACC_W'(vi); q_in = ACC_W'(vq); start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done_o && lat < 100) begin @(negedge clk); lat++; end
    ea = $sqrt(real'(vi) * real'(vi) + real'(vq) * real'(vq));
    ep = $atan2(real'(vq), real'(vi)) / (2.0 * PI) * 65536.0;
    if (ep < 0) ep += 65536.0;
    da = real'(amp_o) - ea;
    dp = real'(phase_o) - ep;
    if (dp > 32768.0) dp -= 65536.0;
    if (dp < -32768.0) dp += 65536.0;
    checks++;
    if (lat != ITER + 2) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (da > 4.0 + ea * 1e-4 || da < -4.0 - ea * 1e-4) begin
      failures++; $display("FAIL amp (%0d,%0d) got %0d exp %f", vi, vq, amp_o, ea);
    end
    checks++;
    if (ea > 100.0 && (dp > 3.0 || dp < -3.0)) begin
      failures++; $display("FAIL phase (%0d,%0d) got %0d exp %f", vi, vq, phase_o, ep);
    end
  endtask

  longint mx;
  initial begin
    start = 0; i_in = 0; q_in = 0;
    mx = (longint'(1) << (ACC_W - 1)) - 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(1000, 1000); one(-1000, 1000); one(-1000, -1000); one(1000, -1000);
    one(mx, mx); one(-mx, -mx); one(-mx - 1, -mx - 1); one(mx, -mx - 1); one(0, 0);
    for (int n = 0; n < 300; n++) begin
      longint a, b;
      int sh;
      sh = $urandom_range(8, ACC_W - 1);
      a = longint'({$urandom, $urandom}) >>> (64 - sh);
      b = longint'({$urandom, $urandom}) >>> (64 - sh);
      one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
