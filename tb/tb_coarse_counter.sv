// tb_coarse_counter: checks the two coarse time counters.
//
// An 80 MHz clock drives the block. After a load the counter A must show
// {offset,0} and then step by one every 80 MHz period (the counting rate the
// chip needs: one count per 12.5 ns), wrap to zero after {roll_over,1}, and
// counter B must equal A half a period later. Parity bits must match and the
// parity error output must stay low. A reference counter in the bench is
// compared at every rising and falling edge.
`timescale 1ps/1ps
module tb_coarse_counter;
  localparam int unsigned W = 13;
  logic clk80 = 0, rst_n = 1, load = 0;
  logic [W-2:0] offset = '0, roll_over = '1;
  logic [W-1:0] cnt_a, cnt_b;
  logic par_a, par_b, parity_error;
  int checks = 0, failures = 0;

  coarse_counter #(.W(W)) dut (.*);

  always #6250 clk80 = ~clk80;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] ref_a;
  task automatic run(int n);
    repeat (n) begin
      @(posedge clk80); #1;
      if (ref_a == {roll_over, 1'b1}) ref_a = '0; else ref_a = ref_a + 1'b1;
      check(cnt_a == ref_a, $sformatf("A %0d expected %0d", cnt_a, ref_a));
      check(par_a == ^cnt_a && !parity_error, "A parity");
      @(negedge clk80); #1;
      check(cnt_b == ref_a && par_b == ^cnt_b, $sformatf("B %0d expected %0d", cnt_b, ref_a));
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk80);
    #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      offset    = W'($urandom) >> 1;
      roll_over = (t < 2) ? '1 : (offset + 12'($urandom_range(2, 20)));
      @(negedge clk80); load = 1;
      @(posedge clk80); #1 load = 0;
      check(cnt_a == {offset, 1'b0}, "loaded value");
      ref_a = {offset, 1'b0};
      run(60);
    end
    // counting rate: 200 periods of 12.5 ns give 200 counts
    begin
      longint t0; logic [W-1:0] a0;
      roll_over = '1;
      @(posedge clk80); #1 t0 = $time; a0 = cnt_a;
      repeat (200) @(posedge clk80);
      #1 check(W'(cnt_a - a0) == 200 && $time - t0 == 200 * 12500, "count rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
