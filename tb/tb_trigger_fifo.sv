// tb_trigger_fifo: checks the 8-word trigger FIFO against a queue model.
//
// Random pushes (event id, time tag) and pops run at varying fill levels.
// Each cycle the bench compares empty, full, nearly_full (6 words),
// occupancy and the head word. A push into a full FIFO must be dropped, set
// the sticky overflow flag, and mark the next stored trigger with the lost
// bit. err_clear must clear overflow. A parity upset written through the
// self-test port must raise parity_error when popped.
`timescale 1ps/1ps
module tb_trigger_fifo;
  import amt_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 1, push = 0, pop = 0, err_clear = 0;
  logic [BC_W-1:0] push_event_id = '0, push_trig_time = '0;
  trig_word_t head;
  logic parity_error, empty, full, nearly_full, overflow;
  logic [3:0] occupancy;
  logic bist_en = 0, bist_we = 0;
  logic [2:0] bist_addr = '0;
  logic [$bits(trig_word_t):0] bist_wdata = '0, bist_rdata;
  int checks = 0, failures = 0, n_lost = 0, n_drop = 0;

  trigger_fifo #(.DEPTH(DEPTH), .NEARLY(6)) dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  trig_word_t q[$];
  bit lost = 0, ovr = 0, was_full;

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == DEPTH) &&
            nearly_full == (q.size() >= 6) && int'(occupancy) == q.size() &&
            overflow == ovr, "flags");
      if (q.size() > 0) check(head == q[0], $sformatf("head %h expected %h", head, q[0]));
      push = ($urandom_range(0, 3) < ((c / 300) % 2 ? 3 : 1));
      pop  = ($urandom_range(0, 3) < ((c / 300) % 2 ? 1 : 3));
      push_event_id = BC_W'($urandom); push_trig_time = BC_W'($urandom);
      err_clear = ($urandom_range(0, 99) == 0);
      #1 check(!parity_error, "no parity error on good data");
      @(posedge clk);
      was_full = (q.size() == DEPTH);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) begin
        if (!was_full) begin
          q.push_back('{lost, push_event_id, push_trig_time});
          if (lost) n_lost++;
          lost = 0;
        end else begin
          lost = 1; ovr = 1; n_drop++;
        end
      end
      if (err_clear) ovr = 0;
    end
    check(n_drop > 0 && n_lost > 0, "overflow and lost marks exercised");
    @(negedge clk); push = 0; pop = 0; err_clear = 0;
    // parity upset
    bist_en = 1; bist_we = 1; bist_addr = dut.rp[2:0]; bist_wdata = '0; bist_wdata[0] = 1'b1;
    @(negedge clk); bist_we = 0; bist_en = 0;
    if (q.size() == 0) begin push = 1; @(negedge clk); push = 0; end
    pop = 1; #1 check(parity_error || (q.size() == 0), "parity error on upset word");
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
