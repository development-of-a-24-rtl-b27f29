// tb_pll_ringosc: checks the behavioural PLL and ring-oscillator model.
//
// From a 40 MHz reference the bench measures: locked rises after the lock
// cycles; clk80 has a 12.5 ns period and clk40 a 25 ns period, both with
// edges aligned to the reference; the taps step through the 16 patterns of
// the tap code in order, one every 0.78125 ns (781 or 782 ps after rounding
// to 1 ps), each pattern being a block of eight ones; and disable_osc stops
// all of them.
`timescale 1ps/1ps
module tb_pll_ringosc;
  localparam int unsigned NTAP = 16;
  logic clk_ref = 0, rst_n = 1, disable_osc = 0;
  logic clk80, clk40, locked;
  logic [NTAP-1:0] taps;
  int checks = 0, failures = 0;

  pll_ringosc #(.NTAP(NTAP), .REF_PERIOD_PS(25000), .LOCK_CYCLES(4)) dut (.*);

  always #12500 clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int bin_of(logic [NTAP-1:0] t);
    for (int j = 0; j < NTAP; j++)
      if (t[j] && !t[(j + 1) % NTAP]) return j;
    return -1;
  endfunction

  longint t_last, t80, t40;
  int last_bin = -1, n_steps = 0;

  always @(taps) begin
    int b;
    b = bin_of(taps);
    check($countones(taps) == NTAP/2, "eight taps high");
    if (last_bin >= 0 && !disable_osc && $time > 25000) begin
      check(b == (last_bin + 1) % NTAP, $sformatf("bin %0d after %0d", b, last_bin));
      check($time - t_last inside {[780:782]}, $sformatf("bin length %0d", $time - t_last));
      n_steps++;
    end
    last_bin = b; t_last = $time;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk_ref);
    #1 rst_n = 1;
    check(!locked, "not locked right after reset");
    repeat (6) @(posedge clk_ref);
    #1 check(locked, "locked after the lock cycles");
    repeat (10) begin
      @(posedge clk80); t80 = $time;
      @(posedge clk80); check($time - t80 == 12500, "clk80 period");
    end
    repeat (10) begin
      @(posedge clk40); t40 = $time;
      check(clk_ref == 1'b1 && (t40 - 12500) % 25000 == 0, "clk40 aligned to the reference");
      @(posedge clk40); check($time - t40 == 25000, "clk40 period");
    end
    check(n_steps > 600, $sformatf("tap steps seen: %0d", n_steps));
    disable_osc = 1;
    repeat (2) @(posedge clk_ref);
    n_steps = 0; last_bin = -1;
    repeat (10) @(posedge clk_ref);
    check(n_steps == 0, "stopped with disable_osc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
