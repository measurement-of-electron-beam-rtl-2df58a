// cordic_vec: amplitude and phase of an integrated I/Q vector.
//
// After a window closes, the two integrals are turned into the beam signal's
// amplitude, proportional to the bunch charge, and its phase against the local
// oscillator, used to compare the beam phase of the booster and the storage ring.
//
// How it works: an iterative CORDIC in vectoring mode.  The vector is first
// folded into the right half plane (adding half a turn to the angle when I < 0),
// then, with G guard bits appended below the LSB, rotated ITER times by +-atan(2**-k) towards the I axis, one step per
// clock, accumulating the angle with ZF extra fraction bits, rounded at the end.  The final I is sqrt(I^2+Q^2) times the CORDIC
// gain, which is removed by one constant multiplication.  The angle and gain
// constants are computed at elaboration.
//
// Interface: pulse `start` with `i_in`/`q_in` while `busy_o` is low.  `done_o`
// pulses ITER+2 clocks later with `amp_o` and `phase_o` (full circle =
// 2**ANG_W, phase = atan2(Q, I)), which hold until the next start.
// Computing amplitude and phase in the FPGA is the measurement system's; the
// CORDIC method, its iteration count and the output scaling are this design's.
module cordic_vec
  import charge_pkg::*;
#(
  parameter int unsigned IN_W  = ACC_W,
  parameter int unsigned OUT_W = AMP_W,
  parameter int unsigned Z_W   = ANG_W,
  parameter int unsigned ITER  = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic                   busy_o,
  output logic                   done_o,
  output logic [OUT_W-1:0]       amp_o,
  output logic [Z_W-1:0]         phase_o
);

  localparam int unsigned G   = 8;          // guard bits below the input LSB
  localparam int unsigned W   = IN_W + 3 + G; // room for the CORDIC gain and folding
  localparam int unsigned ZF  = 4;          // extra angle fraction bits
  localparam int unsigned ZI  = Z_W + ZF;   // internal angle width
  localparam int unsigned KFB = 18;         // fraction bits of the gain correction
  localparam real         PI  = 3.14159265358979323846;

  typedef logic [ZI-1:0] atan_t [ITER];

  function automatic atan_t make_atan();
    atan_t a;
    for (int k = 0; k < ITER; k++)
      a[k] = ZI'($rtoi($atan(1.0 / real'(2.0 ** k)) / (2.0 * PI) * real'(2.0 ** ZI) + 0.5));
    return a;
  endfunction

  function automatic logic [KFB:0] make_kinv();
    real g;
    g = 1.0;
    for (int k = 0; k < ITER; k++) g = g / $sqrt(1.0 + 2.0 ** (-2.0 * real'(k)));
    return (KFB + 1)'($rtoi(g * real'(2.0 ** KFB) + 0.5));
  endfunction

  localparam atan_t        ATAN = make_atan();
  localparam logic [KFB:0] KINV = make_kinv();

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SCALE} state_e;
  state_e                       state;
  logic signed [W-1:0]          x, y;
  logic [ZI-1:0]                z;
  logic [$clog2(ITER)-1:0]      k;
  logic [W+KFB:0]               prod;

  assign busy_o = (state != S_IDLE);
  assign prod   = {{(KFB+1){1'b0}}, x} * {{W{1'b0}}, KINV};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      x       <= '0;
      y       <= '0;
      z       <= '0;
      k       <= '0;
      done_o  <= 1'b0;
      amp_o   <= '0;
      phase_o <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (i_in < 0) begin
            x <= -(W'(i_in) <<< G);
            y <= -(W'(q_in) <<< G);
            z <= ZI'(1) << (ZI - 1);
          end else begin
            x <= W'(i_in) <<< G;
            y <= W'(q_in) <<< G;
            z <= '0;
          end
          k     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (y >= 0) begin
            x <= x + (y >>> k);
            y <= y - (x >>> k);
            z <= z + ATAN[k];
          end else begin
            x <= x - (y >>> k);
            y <= y + (x >>> k);
            z <= z - ATAN[k];
          end
          k <= k + 1'b1;
          if (k == ($clog2(ITER))'(ITER - 1)) state <= S_SCALE;
        end
        S_SCALE: begin
          amp_o   <= OUT_W'(prod >> (KFB + G));
          phase_o <= Z_W'((z + ZI'(1 << (ZF - 1))) >> ZF);
          done_o  <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
