// tb_trigger_interface: checks trigger decoding and the two counters.
//
// Separate-input mode: random triggers, bunch count resets and event count
// resets are applied for thousands of cycles. A cycle model in the bench
// (counter reloaded with bunch_count_offset one cycle after a sampled bunch
// reset, rolling over after roll_over; event counter reloaded with
// event_count_offset, counting triggers) predicts every output one cycle
// after the inputs were sampled; trig_valid must follow a trigger by exactly
// one cycle with the counter value at the sampling edge as its time tag.
// Encoded mode: the 3-bit codes for trigger, bunch reset, event reset and
// master reset are sent on the trigger line; the bench checks the decoded
// pulse, the time tag (counter at the first bit) and that master reset is
// only honoured when enabled.
`timescale 1ps/1ps
module tb_trigger_interface;
  import amt_pkg::*;
  logic clk = 0, rst_n = 1, trigger = 0, bunch_reset = 0, event_reset = 0;
  logic enb_sepa_bcrst = 1, enb_sepa_evrst = 1, enb_mreset_code = 0;
  logic [BC_W-1:0] bunch_count_offset = 12'd100, event_count_offset = 12'd7;
  logic [BC_W-1:0] roll_over = 12'd3563;
  logic trig_valid, bcr, evr, mreset;
  logic [BC_W-1:0] trig_event_id, trig_time, trig_time_cnt, event_cnt;
  int checks = 0, failures = 0, n_trig = 0;

  trigger_interface dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // cycle model (separate-input mode)
  logic [BC_W-1:0] m_cnt, m_ev, m_time;
  logic m_bcr, m_evr, m_tv;
  bit   model_on = 0;

  always @(posedge clk) if (model_on) begin
    logic [BC_W-1:0] c, e; logic b, v, tv; logic [BC_W-1:0] t;
    c  = m_bcr ? bunch_count_offset : (m_cnt == roll_over ? '0 : m_cnt + 1'b1);
    e  = m_evr ? event_count_offset : (m_tv ? m_ev + 1'b1 : m_ev);
    b  = bunch_reset; v = event_reset;
    tv = trigger; t = trigger ? m_cnt : m_time;
    m_cnt = c; m_ev = e; m_bcr = b; m_evr = v; m_tv = tv; m_time = t;
    #1;
    check(trig_time_cnt == m_cnt && event_cnt == m_ev && bcr == m_bcr && evr == m_evr,
          $sformatf("counters %0d/%0d expected %0d/%0d", trig_time_cnt, event_cnt, m_cnt, m_ev));
    check(trig_valid == m_tv, "trigger pulse one cycle after sampling");
    if (m_tv) begin
      check(trig_time == m_time && trig_event_id == m_ev, "trigger tag and event id");
      n_trig++;
    end
  end

  task automatic send_code(logic [1:0] c);
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = c[1];
    @(negedge clk); trigger = c[0];
    @(negedge clk); trigger = 0;
  endtask

  initial begin
    logic [BC_W-1:0] tag;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    m_cnt = trig_time_cnt; m_ev = event_cnt; m_bcr = 0; m_evr = 0; m_tv = 0; m_time = trig_time;
    model_on = 1;
    for (int c = 0; c < 12000; c++) begin
      @(negedge clk);
      trigger     = ($urandom_range(0, 9) == 0);
      bunch_reset = ($urandom_range(0, 1999) == 0) || c == 5;
      event_reset = ($urandom_range(0, 999) == 0) || c == 5;
      if (c == 6000) roll_over = 12'd4095;
    end
    @(negedge clk); trigger = 0; bunch_reset = 0; event_reset = 0;
    @(negedge clk); model_on = 0;
    check(n_trig > 1000, "triggers seen");

    // encoded mode
    enb_sepa_bcrst = 0; enb_sepa_evrst = 0;
    repeat (3) @(negedge clk);
    fork
      send_code(2'b10);
      begin @(posedge bcr); end
    join
    @(posedge clk); #1 check(trig_time_cnt == bunch_count_offset, "encoded bunch reset loads the counter");
    fork
      send_code(2'b01);
      begin @(posedge evr); end
    join
    @(posedge clk); #1 check(event_cnt == event_count_offset, "encoded event reset loads the event counter");
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); trigger = 1; #1 tag = trig_time_cnt;
      @(negedge clk); trigger = 0;
      @(negedge clk);
      @(negedge clk);
      check(trig_valid && trig_time == tag, "encoded trigger tag = counter at first bit");
      check(trig_event_id == event_count_offset + BC_W'(i), "encoded trigger event id");
      repeat (2) @(negedge clk);
    end
    begin
      bit seen = 0;
      fork
        send_code(2'b11);
        repeat (6) @(posedge clk) #1 if (mreset) seen = 1;
      join
      check(!seen, "master reset ignored when not enabled");
      enb_mreset_code = 1; seen = 0;
      fork
        send_code(2'b11);
        repeat (6) @(posedge clk) #1 if (mreset) seen = 1;
      join
      check(seen, "master reset decoded when enabled");
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
