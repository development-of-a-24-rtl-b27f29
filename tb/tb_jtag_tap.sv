// tb_jtag_tap: checks the JTAG test access port.
//
// The bench drives TCK/TMS/TDI as a JTAG master (TDI changes on the falling
// edge, TDO is read at the rising edge). It checks: the instruction register
// captures 0001 and reads back through TDO; IDCODE (also selected by a
// test-logic reset); the CONTROL chain captures the current control
// registers and, on Update-DR, hands new contents to the system clock
// domain with one ctrl_load pulse; the STATUS chain captures the status
// words; the BIST register captures {fail, done} and a 1 in bit 0 gives one
// bist_start pulse; unknown instructions select the one-bit bypass register
// (one TCK of delay from TDI to TDO); SAMPLE and DEBUG capture the pin and
// debug vectors presented at Capture-DR (random values, several times);
// TDO is enabled only while shifting.
`timescale 1ps/1ps
module tb_jtag_tap;
  import amt_pkg::*;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_en;
  logic clk = 0, rst_n = 1;
  ctrl_regs_t ctrl_now = '0, ctrl_data;
  stat_regs_t stat_now = '0;
  logic [2:0] bist_done = 3'b101, bist_fail = 3'b010;
  logic ctrl_load, bist_start;
  logic [63:0] pins = '0;
  logic [41:0] debug = '0;
  int checks = 0, failures = 0, n_load = 0, n_bist = 0;

  jtag_tap dut (.*);

  always #12500 clk = ~clk;
  always @(posedge clk) begin
    if (ctrl_load)  n_load++;
    if (bist_start) n_bist++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic jtck(input logic m, input logic d, output logic o, output logic oe);
    tms = m; tdi = d;
    #50000 tck = 1;
    o = tdo; oe = tdo_en;
    #50000 tck = 0;
  endtask
  task automatic jtag_ir(logic [3:0] ir, output logic [3:0] cap);
    logic o, oe;
    jtck(0, 0, o, oe); jtck(1, 0, o, oe); jtck(1, 0, o, oe); jtck(0, 0, o, oe); jtck(0, 0, o, oe);
    for (int i = 0; i < 4; i++) begin
      jtck(i == 3, ir[i], o, oe); cap[i] = o;
      check(oe, "TDO enabled in Shift-IR");
    end
    jtck(1, 0, o, oe); jtck(0, 0, o, oe);
    check(!oe, "TDO disabled outside shifting");
  endtask
  task automatic jtag_dr(int len, input logic [199:0] din, output logic [199:0] dq);
    logic o, oe;
    dq = '0;
    jtck(1, 0, o, oe); jtck(0, 0, o, oe); jtck(0, 0, o, oe);
    for (int i = 0; i < len; i++) begin
      jtck(i == len-1, din[i], o, oe);
      dq[i] = o;
    end
    jtck(1, 0, o, oe); jtck(0, 0, o, oe);
  endtask

  logic [3:0] cap;
  logic [199:0] q, d;

  initial begin
    #1 rst_n = 0; trst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; trst_n = 1;
    for (int i = 0; i < NCTRL; i++) ctrl_now[i] = REG_W'($urandom);
    for (int i = 0; i < NSTAT; i++) stat_now[i] = REG_W'($urandom);
    // IDCODE after reset
    begin logic o, oe; jtck(0, 0, o, oe); end      // to Run-Test/Idle
    jtag_dr(32, '0, q);
    check(q[31:0] == 32'h1A71_0001, $sformatf("IDCODE after reset %h", q[31:0]));
    // instruction capture
    jtag_ir(4'b1000, cap);
    check(cap == 4'b0001, "IR captures 0001");
    // control chain: capture then update
    for (int i = 0; i < 180; i++) d[i] = 1'($urandom);
    jtag_dr(180, d, q);
    check(q[179:0] == 180'(ctrl_now), "control chain capture");
    repeat (5) @(posedge clk);
    check(ctrl_data == ctrl_regs_t'(d[179:0]) && n_load == 1, "control chain update and one load pulse");
    // status chain
    jtag_ir(4'b1001, cap);
    jtag_dr(72, '0, q);
    check(q[71:0] == 72'(stat_now), "status chain capture");
    // BIST register
    jtag_ir(4'b1010, cap);
    jtag_dr(6, 200'd1, q);
    check(q[5:0] == {bist_fail, bist_done}, "BIST status capture");
    repeat (5) @(posedge clk);
    check(n_bist == 1, "one BIST start pulse");
    jtag_dr(6, 200'd0, q);
    repeat (5) @(posedge clk);
    check(n_bist == 1, "no start with bit 0 clear");
    // pin sampling and internal debug register
    jtag_ir(4'b0010, cap);
    for (int n = 0; n < 4; n++) begin
      pins = {$urandom, $urandom};
      jtag_dr(64, '0, q);
      check(q[63:0] == pins, $sformatf("SAMPLE capture %h", q[63:0]));
    end
    jtag_ir(4'b1011, cap);
    for (int n = 0; n < 4; n++) begin
      debug = {10'($urandom), $urandom};
      jtag_dr(42, '0, q);
      check(q[41:0] == debug, $sformatf("DEBUG capture %h", q[41:0]));
    end
    // bypass
    jtag_ir(4'b1111, cap);
    for (int i = 0; i < 40; i++) d[i] = 1'($urandom);
    jtag_dr(40, d, q);
    check(q[39:1] == d[38:0], "bypass: one TCK delay");
    // test-logic reset selects IDCODE again
    begin logic o, oe; repeat (5) jtck(1, 0, o, oe); jtck(0, 0, o, oe); end
    jtag_dr(32, '0, q);
    check(q[31:0] == 32'h1A71_0001, "IDCODE after test-logic reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
