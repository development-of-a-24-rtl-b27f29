// tb_channel_controller: checks the round-robin channel selection.
//
// Random request patterns and a random ready input are applied each cycle.
// A reference pointer in the bench predicts the grant: the first requesting
// channel after the last one granted. The bench checks the grant index, that
// rd is the one-hot of the grant, that nothing is granted without ready or
// requests, and that a channel requesting all the time is served within N
// grants (no starvation).
`timescale 1ps/1ps
module tb_channel_controller;
  localparam int unsigned N = 24;
  logic clk = 0, rst_n = 1, ready = 0;
  logic [N-1:0] req = '0, rd;
  logic gnt_valid;
  logic [$clog2(N)-1:0] gnt_idx;
  int checks = 0, failures = 0;

  channel_controller #(.N(N)) dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int last = N - 1, exp_idx, since;

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    since = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      req   = {$urandom, $urandom} & ((c % 3 == 0) ? {N{1'b1}} : N'($urandom));
      req[7] = 1'b1;                        // always busy channel
      ready = ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int k = 1; k <= N; k++)
        if (exp_idx < 0 && req[(last + k) % N]) exp_idx = (last + k) % N;
      check(gnt_valid == (ready && exp_idx >= 0), "grant valid");
      if (gnt_valid) begin
        check(int'(gnt_idx) == exp_idx, $sformatf("grant %0d expected %0d", gnt_idx, exp_idx));
        check(rd == (N'(1) << gnt_idx), "rd one-hot");
        last = int'(gnt_idx);
        if (gnt_idx == 7) since = 0; else since++;
        check(since <= N, "busy channel served within N grants");
      end else begin
        check(rd == '0, "no rd without grant");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
