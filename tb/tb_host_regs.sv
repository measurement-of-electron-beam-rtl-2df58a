// tb_host_regs: checks the reset values (switch 12, attenuators 10, NCO word of
// 28.0315 MHz at 108 MHz, disabled), register writes and read-back with one clock
// latency, clamping of the row count, the table write strobe, read data routing
// from the table and result regions, read-only status, and the status clear
// strobe.
module tb_host_regs;
  import charge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [HOST_AW-1:0]     host_addr;
  logic                   host_we;
  logic [HOST_DW-1:0]     host_wdata, host_rdata;
  logic                   enable_o, status_clr_o, tbl_we_o;
  logic [TBL_AW:0]        num_o;
  logic [PHASE_W-1:0]     nco_inc_o;
  logic [3:0]             switch_o;
  logic [NUM_CH-1:0][4:0] att1_o, att2_o;
  logic [HOST_DW-1:0]     cycles_i, tbl_rdata_i, res_rdata_i;
  logic [3:0]             status_i;

  host_regs dut (.clk, .rst_n, .host_addr, .host_we, .host_wdata, .host_rdata, .enable_o,
    .num_o, .nco_inc_o, .switch_o, .att1_o, .att2_o, .status_clr_o, .cycles_i, .status_i,
    .tbl_we_o, .tbl_rdata_i, .res_rdata_i);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    host_addr = HOST_AW'(a); host_we = 1'b1; host_wdata = d;
    #1;
    chk(tbl_we_o == (a >= 'h400 && a < 'h800), $sformatf("table strobe at %h", a));
    chk(status_clr_o == (a == 7), "status clear strobe");
    @(negedge clk) host_we = 1'b0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk);
    host_addr = HOST_AW'(a); host_we = 1'b0;
    @(negedge clk);
    host_addr = HOST_AW'($urandom_range(0, 7));   // the next address must not matter
    d = host_rdata;
  endtask

  logic [31:0] d;
  initial begin
    host_addr = 0; host_we = 0; host_wdata = 0;
    cycles_i = 32'd1234; status_i = 4'b1101; tbl_rdata_i = 32'hAAAA5555; res_rdata_i = 32'h1234_5678;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(switch_o == 4'd12, "switch reset 12");
    for (int c = 0; c < NUM_CH; c++) chk(att1_o[c] == 5'd10 && att2_o[c] == 5'd10, "attenuators reset 10");
    chk(nco_inc_o == 32'd1114762738, $sformatf("NCO reset word %0d", nco_inc_o));
    chk(!enable_o && num_o == 0, "disabled after reset");
    wr('h000, 1);           chk(enable_o, "enable");
    wr('h001, 16);          chk(num_o == 16, "num");
    wr('h001, 100000);      chk(num_o == TBL_DEPTH, "num clamped");
    wr('h002, 32'hdeadbeef); chk(nco_inc_o == 32'hdeadbeef, "nco");
    wr('h003, 5);           chk(switch_o == 5, "switch");
    wr('h004, 32'h000F_FFFF); chk(att1_o == 20'hFFFFF, "att1");
    wr('h005, 32'h0001_8C63); chk(att2_o[0] == 5'd3 && att2_o[3] == 5'd3, "att2 fields");
    rd('h000, d); chk(d == 1, "read ctrl");
    rd('h001, d); chk(d == TBL_DEPTH, "read num");
    rd('h002, d); chk(d == 32'hdeadbeef, "read nco");
    rd('h003, d); chk(d == 5, "read switch");
    rd('h004, d); chk(d == 32'h000F_FFFF, "read att1");
    rd('h006, d); chk(d == 1234, "read cycles");
    rd('h007, d); chk(d == 13, "read status");
    wr('h006, 0); rd('h006, d); chk(d == 1234, "cycles read only");
    wr('h007, 0);
    wr('h456, 7);
    rd('h456, d); chk(d == 32'hAAAA5555, "table region routed");
    rd('h9A3, d); chk(d == 32'h1234_5678, "result region routed");
    wr('h000, 0); chk(!enable_o, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
