// tb_trigger_matching: checks trigger matching, event framing, rejection and
// direct pass-through.
//
// The bench models the blocks around the matcher: a 256-word L1 buffer with
// a one-cycle synchronous read, a trigger FIFO (queue, head visible) and the
// read-out FIFO input with a full flag that the bench toggles at random.
// Hits are generated in time order with random channels; before each
// trigger is queued, all hits up to its search window are written, as the
// trigger latency guarantees in the chip. The expected event for a trigger
// with tag T is computed from the hit list alone: header, every hit whose
// bunch time b satisfies 0 <= b-T <= match_window (in buffer order), a mask
// word with the channels of hits in -mask_window <= b-T < 0 (if any), and a
// trailer with the word count. Bunch times cross the 4095 roll-over.
// Phases:
//   1  matching with back-pressure (read-out full stalls the scan)
//   2  relative time and pair words
//   3  read-out full rejection: hits dropped are counted and the rest match
//   4  automatic rejection of hits older than the reject counter
//   5  error word: with enb_errmark and error flags up, every event carries
//      an error word with the flags before its trailer
//   6  direct pass-through with matching disabled
// An event with an empty buffer must take at most 6 cycles (rate check).
`timescale 1ps/1ps
module tb_trigger_matching;
  import amt_pkg::*;
  localparam int MW = 6, SW = 10, MSK = 5;
  localparam logic [3:0] TDC = 4'h5;

  logic clk = 0, rst_n = 1;
  logic enb_match = 1, enb_mask = 1, enb_header = 1, enb_trailer = 1, enb_relative = 0;
  logic enb_auto_reject = 0, enb_rofull_reject = 0, enb_errmark = 0;
  logic [NERR-1:0] err_flags = '0;
  logic [BC_W-1:0] match_window = MW, search_window = SW, mask_window = MSK;
  logic [BC_W-1:0] reject_count_offset = '0, roll_over = 12'hFFF;
  logic [3:0] tdc_id = TDC;
  logic bcr = 0;
  logic trg_empty, trg_pop;
  trig_word_t trg_head;
  logic [8:0] l1_wr_ptr, l1_start_ptr, l1_rd_addr;
  logic l1_rd_en;
  l1_word_t l1_rdata;
  logic ro_full = 0, ro_push;
  logic [31:0] ro_wdata;
  logic rejected, ro_rejected, busy;
  logic [BC_W-1:0] reject_cnt;
  int checks = 0, failures = 0, n_rej = 0, n_rorej = 0;

  trigger_matching #(.L1_DEPTH(256)) dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- surrounding blocks ----
  l1_word_t l1mem [256];
  logic [8:0] wp = '0;
  assign l1_wr_ptr = wp;
  always @(posedge clk) if (l1_rd_en) l1_rdata <= l1mem[l1_rd_addr[7:0]];

  trig_word_t trigq[$];
  assign trg_empty = (trigq.size() == 0);
  assign trg_head  = (trigq.size() > 0) ? trigq[0] : '0;
  always @(posedge clk) if (trg_pop && trigq.size() > 0) begin #1 void'(trigq.pop_front()); end

  logic [31:0] got[$];
  always @(posedge clk) begin
    if (ro_push && !ro_full) got.push_back(ro_wdata);
    if (rejected) n_rej++;
    if (ro_rejected) n_rorej++;
  end

  // ---- hits ----
  l1_word_t hits[$];
  int wr_idx = 0;
  int next_bc;

  function automatic int dfold(int a, int b);
    int d; d = a - b;
    if (d > 2048) d -= 4096; else if (d < -2048) d += 4096;
    return d;
  endfunction

  // make hits for bunches up to `upto` (absolute, unwrapped)
  task automatic gen_hits(int upto, bit pair);
    while (next_bc <= upto) begin
      if ($urandom_range(0, 2) == 0) begin
        l1_word_t h;
        h.status = pair ? L1_PAIR : ($urandom_range(0, 1) ? L1_LEAD : L1_TRAIL);
        h.channel = CH_W'($urandom_range(0, NCH-1));
        h.width = pair ? 8'($urandom) : 8'h00;
        h.edge_time = {12'(next_bc % 4096), 5'($urandom)};
        hits.push_back(h);
      end
      next_bc++;
    end
  endtask

  // write pending hits into the buffer (one per cycle)
  task automatic write_hits();
    while (wr_idx < hits.size()) begin
      @(negedge clk);
      if (9'(wp - l1_start_ptr) < 9'd250) begin
        l1mem[wp[7:0]] = hits[wr_idx]; wp = wp + 1'b1; wr_idx++;
      end
    end
  endtask

  function automatic logic [31:0] hword(l1_word_t h, bit rel, int tag);
    logic [16:0] t;
    t = rel ? h.edge_time - {12'(tag), 5'b0} : h.edge_time;
    case (h.status)
      L1_PAIR:  return {ID_PAIR, TDC, h.channel, h.width, t[10:0]};
      L1_TRAIL: return {ID_TRAIL, TDC, h.channel, 2'b00, t};
      default:  return {ID_LEAD, TDC, h.channel, 2'b00, t};
    endcase
  endfunction

  logic [31:0] expq[$];
  int n_match_exp = 0;

  task automatic expect_event(int evid, int tag, bit rel);
    logic [23:0] m; int n, d;
    expq.push_back({ID_HEADER, TDC, 12'(evid), 12'(tag)});
    m = '0; n = 2;
    foreach (hits[i]) begin
      d = dfold(int'(hits[i].edge_time[16:5]), tag);
      if (d >= 0 && d <= MW) begin expq.push_back(hword(hits[i], rel, tag)); n++; n_match_exp++; end
      else if (d < 0 && d >= -MSK) m[hits[i].channel] = 1'b1;
    end
    if (m != 0) begin expq.push_back({ID_MASK, TDC, m}); n++; end
    if (enb_errmark && err_flags != 0) begin
      expq.push_back({ID_ERROR, TDC, 15'd0, err_flags}); n++;
    end
    expq.push_back({ID_TRAILER, TDC, 12'(evid), 12'(n)});
  endtask

  task automatic wait_idle();
    repeat (3) @(posedge clk);
    while (trigq.size() > 0 || busy) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  task automatic run_triggers(int ntrig, int start_bc, bit pair, bit rel);
    int tag;
    next_bc = start_bc;
    for (int k = 0; k < ntrig; k++) begin
      tag = start_bc + 20 + 17 * k;
      gen_hits(tag + SW + 2, pair);
      write_hits();
      trigq.push_back('{1'b0, 12'(k), 12'(tag % 4096)});
      expect_event(k, tag % 4096, rel);
    end
    wait_idle();
  endtask

  task automatic compare(string what);
    check(got.size() == expq.size(), $sformatf("%s: %0d words, expected %0d", what, got.size(), expq.size()));
    foreach (expq[i])
      if (i < got.size()) check(got[i] == expq[i], $sformatf("%s: word %0d %h expected %h", what, i, got[i], expq[i]));
  endtask

  // flush the buffer between phases: move past everything written
  task automatic flush();
    next_bc += 100;
    trigq.push_back('{1'b0, 12'd0, 12'(next_bc % 4096)});
    wait_idle();
    got.delete(); expq.delete(); hits.delete(); wr_idx = 0;
  endtask

  logic stall_on = 0;
  always @(negedge clk) ro_full <= stall_on && ($urandom_range(0, 2) == 0);

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // rate: an event with an empty buffer
    begin
      int cyc = 0;
      @(negedge clk); trigq.push_back('{1'b0, 12'd0, 12'd50});
      @(posedge clk); #2;
      while (busy || trigq.size() > 0) begin @(posedge clk); #2 cyc++; end
      check(cyc <= 6, $sformatf("empty event took %0d cycles", cyc));
      check(got.size() == 2, "empty event is header + trailer");
      got.delete();
    end

    // 1: matching with random back-pressure, crossing the roll-over
    stall_on = 1;
    run_triggers(40, 3700, 0, 0);
    compare("matching");
    check(n_match_exp > 20, "enough matched hits");
    stall_on = 0;
    flush();

    // 2: relative time, pair words
    enb_relative = 1;
    run_triggers(20, next_bc, 1, 1);
    compare("pair/relative");
    enb_relative = 0;
    flush();

    // 3: read-out full rejection
    enb_rofull_reject = 1; stall_on = 1; n_rorej = 0;
    run_triggers(20, next_bc, 0, 0);
    begin
      int nh = 0, nexp = 0;
      foreach (got[i])  if (got[i][31:28] == ID_LEAD || got[i][31:28] == ID_TRAIL) nh++;
      foreach (expq[i]) if (expq[i][31:28] == ID_LEAD || expq[i][31:28] == ID_TRAIL) nexp++;
      check(n_rorej > 0 && nh + n_rorej == nexp,
            $sformatf("hits written %0d + rejected %0d = matched %0d", nh, n_rorej, nexp));
    end
    enb_rofull_reject = 0; stall_on = 0;
    flush();

    // 4: automatic reject: reject counter 30 bunches behind the trigger time
    enb_auto_reject = 1; n_rej = 0;
    @(negedge clk); reject_count_offset = 12'((next_bc - 30) % 4096); bcr = 1;
    @(negedge clk); bcr = 0;
    begin
      int base; base = next_bc;
      gen_hits(base + 20, 0);
      write_hits();
      // hits are 30..50 bunches ahead of the counter now; after 60 cycles
      // the older ones have fallen behind it and must be gone
      repeat (60) @(posedge clk);
      #1;
      check(n_rej > 0, "old hits rejected");
      check(9'(wp - l1_start_ptr) <= 9'(hits.size() - n_rej + 1) && 9'(wp - l1_start_ptr) < 9'(hits.size()),
            "start pointer moved past rejected hits");
    end
    enb_auto_reject = 0;
    flush();

    // 5: error word in every event while flags are up
    enb_errmark = 1; err_flags = 9'h124; stall_on = 1;
    run_triggers(10, next_bc, 0, 0);
    compare("error word");
    begin
      int ne = 0;
      foreach (got[i]) if (got[i][31:28] == ID_ERROR) ne++;
      check(ne == 10, $sformatf("%0d error words in 10 events", ne));
    end
    err_flags = '0; stall_on = 0;
    run_triggers(5, next_bc, 0, 0);
    compare("no error word without flags");
    enb_errmark = 0;
    flush();

    // 6: direct pass-through
    enb_match = 0;
    gen_hits(next_bc + 40, 0);
    foreach (hits[i]) expq.push_back(hword(hits[i], 0, 0));
    write_hits();
    repeat (3 * hits.size() + 10) @(posedge clk);
    compare("direct");
    check(l1_start_ptr == wp, "buffer empty after direct read-out");

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
