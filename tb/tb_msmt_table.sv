// tb_msmt_table: fills the table with random rows through the host port (all
// four words of each row), then reads every word back through the host port and
// every row through the sequencer port, checking the host words (with unused
// bits reading zero) and the unpacked fields against a model, with one clock
// latency.
module tb_msmt_table;
  import charge_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [TBL_AW+1:0]  a_addr;
  logic               a_we;
  logic [HOST_DW-1:0] a_wdata, a_rdata;
  logic [TBL_AW-1:0]  b_addr;
  msmt_t              b_row;
  msmt_table dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_row);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m [4][TBL_DEPTH];

  // What the host reads back from word w of a row written with v.
  function automatic logic [31:0] host_word(int w, logic [31:0] v);
    case (w)
      0: return v;
      1: return {8'h00, v[23:0]};
      2: return {v[31], 7'h00, v[23:0]};
      default: return {12'h000, v[19:0]};
    endcase
  endfunction

  initial begin
    a_we = 0; a_addr = 0; a_wdata = 0; b_addr = 0;
    for (int r = 0; r < TBL_DEPTH; r++) begin
      for (int w = 0; w < 4; w++) begin
        m[w][r] = $urandom;
        @(negedge clk);
        a_we = 1; a_addr = {TBL_AW'(r), 2'(w)}; a_wdata = m[w][r];
      end
    end
    @(negedge clk) a_we = 0;
    for (int n = 0; n < 4 * TBL_DEPTH; n++) begin
      int r, w, rb;
      r  = n / 4;
      w  = (n + r) % 4;
      rb = TBL_DEPTH - 1 - (n % TBL_DEPTH);
      a_addr = {TBL_AW'(r), 2'(w)};
      b_addr = TBL_AW'(rb);
      @(negedge clk);
      checks++;
      if (a_rdata != host_word(w, m[w][r])) begin
        failures++; $display("FAIL host read row %0d word %0d", r, w);
      end
      checks++;
      if (b_row.trig != trig_sel_e'(m[0][rb][31]) || b_row.sig != m[0][rb][30:29] ||
          b_row.dsp != m[0][rb][28] || b_row.gain != m[0][rb][27:24] ||
          b_row.start != m[0][rb][23:0] || b_row.stop != m[1][rb][23:0] ||
          b_row.fe_set != m[2][rb][31] || b_row.fe.sw != m[2][rb][3:0] ||
          b_row.fe.att1 != m[2][rb][23:4] || b_row.fe.att2 != m[3][rb][19:0]) begin
        failures++; $display("FAIL seq read row %0d", rb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
