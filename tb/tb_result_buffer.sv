// tb_result_buffer: writes random results to random rows and reads all eight
// words of every written row back, comparing with the documented word layout
// (sign extension of I/Q, amplitude split, late flag and phase, cycle tag).
module tb_result_buffer;
  import charge_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               a_we;
  logic [TBL_AW-1:0]  a_row;
  result_t            a_res;
  logic [31:0]        a_cycle;
  logic [TBL_AW+2:0]  b_addr;
  logic [31:0]        b_rdata;
  result_buffer dut (.clk, .a_we, .a_row, .a_res, .a_cycle, .b_addr, .b_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  result_t     m [TBL_DEPTH];
  logic [31:0] mc [TBL_DEPTH];
  bit          w [TBL_DEPTH];
  initial begin
    a_we = 0; a_row = 0; a_res = '0; a_cycle = 0; b_addr = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a_we = 1; a_row = TBL_AW'($urandom); a_cycle = $urandom;
      a_res = {$urandom, $urandom, $urandom, $urandom, $urandom};
      m[a_row] = a_res; mc[a_row] = a_cycle; w[a_row] = 1;
    end
    @(negedge clk) a_we = 0;
    for (int r = 0; r < TBL_DEPTH; r++) begin
      if (!w[r]) continue;
      for (int k = 0; k < 8; k++) begin
        logic [31:0] e;
        longint li, lq, la;
        li = longint'(m[r].i); lq = longint'(m[r].q); la = longint'(m[r].amp);
        case (k)
          0: e = li[31:0];  1: e = li[63:32];
          2: e = lq[31:0];  3: e = lq[63:32];
          4: e = la[31:0];  5: e = la[63:32];
          6: e = {m[r].late, 15'd0, m[r].phase};
          default: e = mc[r];
        endcase
        b_addr = {TBL_AW'(r), 3'(k)};
        @(negedge clk);
        checks++;
        if (b_rdata != e) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d word %0d got %h exp %h", r, k, b_rdata, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
