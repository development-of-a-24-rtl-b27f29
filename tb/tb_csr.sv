// tb_csr: checks the control and status register file.
//
// After reset the control registers must hold the reset defaults. Random
// bus writes to CSR0..CSR14 are read back through the bus and compared with
// a copy in the bench; writes to other addresses must change nothing. The
// decoded configuration is spot-checked field by field (windows, offsets,
// tdc id, enables, channel enables), status words must appear at CSR16..21,
// a JTAG load must replace all 15 registers in one cycle, and the control
// parity output must stay low for every legal write.
`timescale 1ps/1ps
module tb_csr;
  import amt_pkg::*;
  logic clk = 0, rst_n = 1, wr = 0, jtag_load = 0;
  logic [4:0] addr = '0;
  logic [REG_W-1:0] wdata = '0, rdata;
  ctrl_regs_t jtag_ctrl = '0, ctrl;
  stat_regs_t stat = '0;
  amt_cfg_t cfg;
  logic control_parity;
  int checks = 0, failures = 0;

  csr dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  ctrl_regs_t m;

  task automatic cfg_check();
    check(cfg.mask_window == m[1] && cfg.search_window == m[2] && cfg.match_window == m[3] &&
          cfg.reject_count_offset == m[4] && cfg.event_count_offset == m[5] &&
          cfg.bunch_count_offset == m[6] && cfg.coarse_time_offset == m[7] &&
          cfg.count_roll_over == m[8], "decoded windows and offsets");
    check(cfg.tdc_id == m[9][3:0] && cfg.width_select == m[9][7:5] &&
          cfg.readout_speed == m[9][9:8] && cfg.strobe_select == m[9][11:10], "decoded CSR9");
    check(cfg.enb_leading == m[10][0] && cfg.enb_trailing == m[10][1] && cfg.enb_pair == m[10][2] &&
          cfg.enb_serial == m[10][6] && cfg.enb_match == m[10][9] && cfg.enb_auto_reject == m[10][11],
          "decoded CSR10");
    check(cfg.global_reset == m[0][11] && cfg.error_reset == m[0][10], "decoded CSR0");
    check(cfg.enb_sepa_bcrst == m[12][10] && cfg.enb_error == m[12][8:0], "decoded CSR12");
    check(cfg.enb_channel == {m[14], m[13]}, "decoded channel enables");
    check(ctrl == m, "register outputs");
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m = CTRL_RESET;
    @(negedge clk);
    cfg_check();
    check(!control_parity, "parity clean after reset");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 5'($urandom_range(0, 31)); wdata = REG_W'($urandom); wr = 1;
      @(posedge clk);
      if (addr < NCTRL) m[addr] = wdata;
      #1 wr = 0;
      @(negedge clk);
      cfg_check();
      check(!control_parity, "parity clean after write");
      addr = 5'($urandom_range(0, 14)); #1;
      check(rdata == m[addr], $sformatf("read back CSR%0d", addr));
    end
    // status registers
    for (int i = 0; i < NSTAT; i++) stat[i] = REG_W'($urandom);
    for (int a = 15; a < 32; a++) begin
      @(negedge clk); addr = 5'(a); #1;
      if (a >= 16 && a <= 21) check(rdata == stat[a-16], $sformatf("status CSR%0d", a));
      else                    check(rdata == '0, "unused address reads zero");
    end
    // JTAG load
    for (int i = 0; i < NCTRL; i++) jtag_ctrl[i] = REG_W'($urandom);
    @(negedge clk); jtag_load = 1;
    @(posedge clk); m = jtag_ctrl; #1 jtag_load = 0;
    @(negedge clk);
    cfg_check();
    check(!control_parity, "parity clean after JTAG load");
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
