// tb_readout_fifo: checks the 64-word read-out FIFO against a queue model.
//
// Random pushes and pops run for several thousand cycles at varying fill
// levels. Every cycle the bench compares empty, full, occupancy and the head
// word (visible without a read cycle) with the model; pushes into a full
// FIFO must be refused. Then a word with wrong parity is written through the
// self-test port and popped, which must raise parity_error for that pop; the
// self-test port's one-cycle read is checked on the way.
`timescale 1ps/1ps
module tb_readout_fifo;
  localparam int unsigned DEPTH = 64, WIDTH = 32;
  logic clk = 0, rst_n = 1, push = 0, pop = 0;
  logic [WIDTH-1:0] wdata = '0, head;
  logic parity_error, empty, full;
  logic [6:0] occupancy;
  logic bist_en = 0, bist_we = 0;
  logic [5:0] bist_addr = '0;
  logic [32:0] bist_wdata = '0, bist_rdata;
  int checks = 0, failures = 0, n_perr = 0;

  readout_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [WIDTH-1:0] q[$];
  int pp, pq;
  bit was_full;

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      pp = (c / 500) % 2 ? 3 : 1;      // phases filling and draining
      pq = (c / 500) % 2 ? 1 : 3;
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == DEPTH) &&
            int'(occupancy) == q.size(), $sformatf("flags e%b f%b occ %0d model %0d", empty, full, occupancy, q.size()));
      if (q.size() > 0) check(head == q[0], "head word");
      push = ($urandom_range(0, 3) < pp); wdata = $urandom;
      pop  = ($urandom_range(0, 3) < pq);
      check(!parity_error || !pop, "no parity error on good data");
      @(posedge clk);
      was_full = (q.size() == DEPTH);          // a push into a full FIFO is refused
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !was_full) q.push_back(wdata);
    end
    @(negedge clk); push = 0; pop = 0;
    // drain
    while (q.size() > 0) begin
      @(negedge clk); check(head == q[0], "head while draining"); pop = 1;
      @(posedge clk); void'(q.pop_front()); #1 pop = 0;
    end
    // parity upset through the self-test port
    @(negedge clk); push = 1; wdata = 32'h1234_5678;
    @(negedge clk); push = 0;
    bist_en = 1; bist_we = 1; bist_addr = dut.rp[5:0]; bist_wdata = {^32'h1234_5678, 32'h1234_5679};
    @(negedge clk); bist_we = 0;
    @(negedge clk); check(bist_rdata == {^32'h1234_5678, 32'h1234_5679}, "self-test read back");
    bist_en = 0;
    @(negedge clk); pop = 1; #1;
    check(parity_error, "parity error on upset word");
    @(negedge clk); pop = 0;
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
