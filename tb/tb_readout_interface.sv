// tb_readout_interface: checks the parallel and serial read-out.
//
// A queue in the bench stands in for the read-out FIFO (head word visible,
// popped by fifo_pop). Parallel mode: dout/dready must show the head and a
// word must be popped exactly when get_data and dready are both high.
// Serial mode: for each speed setting (80, 40, 20, 10 Mbit/s) and both strobe
// modes the bench decodes the two output lines on the 80 MHz clock. In
// data-strobe mode every bit changes exactly one of the two lines; in
// data-clock mode the strobe toggles every bit. Each packet must be start
// bit 1, 32 data bits (MSB first), even parity, stop bit 0, and every bit
// must last 2**readout_speed clock periods.
`timescale 1ps/1ps
module tb_readout_interface;
  logic clk = 0, clk80 = 0, rst_n = 1;
  logic enb_serial = 0, get_data = 0;
  logic [1:0] readout_speed = 0, strobe_select = 0;
  logic fifo_empty, fifo_pop, dready, sdata, sstrobe, s_busy;
  logic [31:0] fifo_head, dout;
  int checks = 0, failures = 0;

  readout_interface dut (.*);

  always #6250 clk80 = ~clk80;
  always @(posedge clk80) clk <= ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] q[$], sent[$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_head  = (q.size() > 0) ? q[0] : 32'h0;
  always @(posedge clk) if (fifo_pop && q.size() > 0) begin #1 sent.push_back(q.pop_front()); end

  // serial decoder
  logic pd = 0, ps = 0;
  int   nb = 0, run = 0;
  logic [34:0] sw;
  logic [31:0] rx[$];
  always @(posedge clk80) begin
    #100;
    run++;
    if (enb_serial && (sdata !== pd || sstrobe !== ps)) begin
      if (strobe_select[0] == 1'b0)
        check((sdata !== pd) != (sstrobe !== ps), "DS: exactly one line changes per bit");
      if (nb > 0) check(run == (1 << readout_speed), $sformatf("bit length %0d", run));
      run = 0;
      sw = {sw[33:0], sdata};
      nb++;
      if (nb == 35) begin
        check(sw[34] == 1'b1 && sw[0] == 1'b0, "start and stop bits");
        check(sw[1] == ^sw[33:2], "parity bit");
        rx.push_back(sw[33:2]);
        nb = 0;
      end
    end else if (enb_serial && nb > 0 && strobe_select[0]) begin
      // in data-clock mode the strobe toggles every bit
      check(run < (1 << readout_speed), "strobe toggles every bit");
    end
    pd = sdata; ps = sstrobe;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // parallel
    for (int i = 0; i < 40; i++) q.push_back($urandom);
    begin
      logic [31:0] want[$];
      want = q;
      for (int c = 0; c < 300 && q.size() > 0; c++) begin
        @(negedge clk);
        get_data = $urandom_range(0, 1);
        check(dready == (q.size() > 0) && (q.size() == 0 || dout == q[0]), "dready and dout");
        #1 check(fifo_pop == (get_data && dready), "pop exactly on get_data && dready");
      end
      @(negedge clk); get_data = 0;
      check(sent == want, "parallel words in order");
    end
    // serial
    for (int m = 0; m < 8; m++) begin
      readout_speed = 2'(m % 4); strobe_select = {1'b0, m >= 4};
      sent.delete(); rx.delete();
      @(negedge clk); enb_serial = 1;
      for (int i = 0; i < 4; i++) q.push_back((i == 0) ? 32'hAAAA_5555 : $urandom);
      while (q.size() > 0 || s_busy) @(posedge clk);
      repeat (8) @(posedge clk);
      check(rx.size() == 4 && rx == sent, $sformatf("serial words speed %0d strobe %0d: %0d of %0d %p %p", readout_speed, strobe_select, rx.size(), sent.size(), rx, sent));
      check(dready == 0, "no parallel data in serial mode");
      @(negedge clk); enb_serial = 0;
      nb = 0;
    end
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
