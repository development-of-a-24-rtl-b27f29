// tb_amt_top: end-to-end test of the 24-channel TDC at its default sizes.
//
// The bench plays hit pulses on random channels at known times, sends
// triggers a fixed latency later, reads the event data back and compares it
// word by word with a reference computed here from the pulse times alone:
// edge time = 2*coarse_time_offset*16 + number of 0.78125 ns bins since the
// moment the coarse counter was loaded, trigger tag = bunch_count_offset +
// cycles since that moment. Phases:
//   A  leading and trailing edges, mask flags, parallel read-out
//   B  pair words (leading time + width) with time relative to the trigger
//   C  serial read-out, DS protocol, decoded from the two lines
//   D  automatic rejection of old hits with no trigger waiting
//   E  read-out stalled: read-out FIFO full, trigger FIFO overflow
//   F  JTAG: IDCODE, control chain read, memory self test, pin sampling
// Each mechanism is counted; one that never occurred counts as a failure.
`timescale 1ps/1ps
module tb_amt_top;
  import amt_pkg::*;

  localparam int unsigned TCLK = 25000;
  localparam int unsigned COFF = 256;       // coarse_time_offset
  localparam int unsigned LAT  = 40;        // trigger latency in cycles
  localparam int unsigned BOFF = COFF - LAT;
  localparam int unsigned ROFF = COFF - 60; // reject_count_offset
  localparam int unsigned MW = 4, SW = 8, MSK = 4;
  localparam logic [3:0]  TDC = 4'hA;
  localparam int unsigned EOFF = 5;         // event_count_offset

  logic clk = 0, rst_n = 1;
  logic [NCH-1:0] hit = '0;
  logic trigger = 0, bunch_reset = 0, event_reset = 0;
  logic [4:0] csr_addr = '0;
  logic csr_wr = 0;
  logic [11:0] csr_wdata = '0, csr_rdata;
  logic [31:0] dout;
  logic dready, get_data = 0, serial_data, serial_strobe, error, pll_locked;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_en;

  amt_top dut (.*);

  always #(TCLK/2) clk = ~clk;

  int checks = 0, failures = 0;
  int n_lead = 0, n_trail = 0, n_pair = 0, n_mask = 0, n_serial = 0, n_reject = 0,
      n_rofull = 0, n_trgovr = 0, n_bist = 0, n_events = 0, n_rel = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model -------------------------------------
  longint unsigned t_e;             // time the counters were loaded

  typedef struct { int ch; bit trail; longint unsigned t; bit rejected; } edge_t;
  edge_t edges[$];
  typedef struct { int ch; longint unsigned tl, tt; } pulse_t;
  pulse_t pulses[$];

  function automatic int unsigned bins_since(longint unsigned t);
    longint unsigned n, r; int unsigned k;
    n = (t - t_e) / TCLK; r = (t - t_e) % TCLK; k = 0;
    for (int unsigned j = 0; j < 32; j++) if ((j * TCLK) / 32 <= r) k = j;
    return int'(n * 32 + k);
  endfunction
  function automatic logic [16:0] tdc_time(longint unsigned t);
    return 17'(2 * COFF * 16 + bins_since(t));
  endfunction
  // time at bin k (0..31) of cycle n after the load, 300 ps into the bin
  function automatic longint unsigned at(int n, int k);
    return t_e + longint'(n) * TCLK + (k * TCLK) / 32 + 300;
  endfunction
  function automatic int dfold(int a, int b);
    int d; d = a - b;
    if (d > 2048) d -= 4096; else if (d < -2048) d += 4096;
    return d;
  endfunction

  task automatic pulse(int ch, longint unsigned tl, longint unsigned tt);
    fork begin
      #(tl - $time) hit[ch] = 1'b1;
      #(tt - tl)    hit[ch] = 1'b0;
    end join_none
    pulses.push_back('{ch, tl, tt});
    edges.push_back('{ch, 1'b0, tl, 1'b0});
    edges.push_back('{ch, 1'b1, tt, 1'b0});
  endtask

  // trigger sampled at edge e (cycles after the load); tag = BOFF + e - 1
  task automatic trig_at(int e);
    fork begin
      #(t_e + longint'(e) * TCLK - TCLK/2 - $time) trigger = 1'b1;
      #(TCLK) trigger = 1'b0;
    end join_none
  endtask

  // ---------------- register access -------------------------------------
  task automatic csr_write(int a, logic [11:0] v);
    @(negedge clk); csr_addr = 5'(a); csr_wdata = v; csr_wr = 1;
    @(negedge clk); csr_wr = 0;
  endtask
  task automatic csr_read(int a, output logic [11:0] v);
    @(negedge clk); csr_addr = 5'(a); #1 v = csr_rdata;
  endtask

  // ---------------- read-out collection ----------------------------------
  logic [31:0] got[$];
  bit use_serial = 0;

  // parallel port: sampled 200 ps before each rising clock edge, where the
  // chip takes the word
  always @(negedge clk) begin
    #(TCLK/2 - 200);
    if (!use_serial && get_data && dready) got.push_back(dout);
  end
  // serial DS decoder: sample both lines every 80 MHz period; a change of
  // either line marks a bit whose value is the data line.
  logic pd = 0, ps = 0;
  int   sbits = 0;
  logic [34:0] sword;
  always @(posedge dut.clk80) begin
    #100;
    if (use_serial && (serial_data !== pd || serial_strobe !== ps)) begin
      sword = {sword[33:0], serial_data};
      sbits++;
      if (sbits == 1 && serial_data != 1'b1) begin
        sbits = 0;
      end else if (sbits == 35) begin
        check(sword[34] == 1'b1 && sword[0] == 1'b0, "serial start/stop bits");
        check(sword[1] == ^sword[33:2], "serial parity");
        got.push_back(sword[33:2]);
        n_serial++;
        sbits = 0;
      end
    end
    pd = serial_data; ps = serial_strobe;
  end

  // ---------------- event checker ----------------------------------------
  typedef struct { int e; int evid; } trig_t;
  trig_t trigs[$];
  int evcount = 0;

  task automatic send_trigger(int e);
    trig_at(e);
    trigs.push_back('{e, evcount});
    evcount++;
  endtask

  // expected contents of one event (pair: pair words, relative times)
  task automatic expect_event(trig_t tr, bit pair, bit rel, output logic [31:0] hdr,
                              output logic [31:0] hits[$], output logic [31:0] mask,
                              output bit has_mask);
    int tag, d; logic [23:0] m; logic [16:0] tl, tt, rt; int w;
    tag = (BOFF + tr.e - 1) % 4096;
    hdr = {ID_HEADER, TDC, 12'(EOFF + tr.evid), 12'(tag)};
    hits.delete(); m = '0;
    if (!pair) begin
      foreach (edges[i]) begin
        if (edges[i].rejected) continue;
        tl = tdc_time(edges[i].t);
        d  = dfold(int'(tl[16:5]), tag);
        if (d >= 0 && d <= int'(MW))
          hits.push_back({edges[i].trail ? ID_TRAIL : ID_LEAD, TDC, 5'(edges[i].ch), 2'b00, tl});
        else if (d < 0 && d >= -int'(MSK)) m[edges[i].ch] = 1'b1;
      end
    end else begin
      foreach (pulses[i]) begin
        tl = tdc_time(pulses[i].tl);
        tt = tdc_time(pulses[i].tt);
        d  = dfold(int'(tl[16:5]), tag);
        w  = int'(tt - tl);
        if (w > 255) w = 255;
        rt = rel ? 17'(tl - {12'(tag), 5'b0}) : tl;
        if (d >= 0 && d <= int'(MW))
          hits.push_back({ID_PAIR, TDC, 5'(pulses[i].ch), 8'(w), rt[10:0]});
        else if (d < 0 && d >= -int'(MSK)) m[pulses[i].ch] = 1'b1;
      end
    end
    has_mask = (m != 0);
    mask = {ID_MASK, TDC, m};
  endtask

  task automatic check_events(bit pair, bit rel);
    logic [31:0] hdr, mask, w; logic [31:0] hits[$]; bit has_mask;
    int nw, idx;
    foreach (trigs[t]) begin
      expect_event(trigs[t], pair, rel, hdr, hits, mask, has_mask);
      n_events++;
      check(got.size() > 0, "event present");
      if (got.size() == 0) return;
      w = got.pop_front();
      check(w == hdr, $sformatf("header %h expected %h", w, hdr));
      nw = 1;
      while (got.size() > 0 && got[0][31:28] != ID_TRAILER && got[0][31:28] != ID_MASK) begin
        w = got.pop_front(); nw++;
        idx = -1;
        foreach (hits[i]) if (hits[i] == w) idx = i;
        check(idx >= 0, $sformatf("unexpected hit word %h", w));
        if (idx >= 0) hits.delete(idx);
        case (w[31:28])
          ID_LEAD:  n_lead++;
          ID_TRAIL: n_trail++;
          ID_PAIR:  begin n_pair++; if (rel) n_rel++; end
          default: ;
        endcase
      end
      check(hits.size() == 0, $sformatf("%0d expected hit words missing", hits.size()));
      if (has_mask) begin
        w = got.size() > 0 ? got.pop_front() : '0; nw++;
        check(w == mask, $sformatf("mask word %h expected %h", w, mask));
        n_mask++;
      end
      w = got.size() > 0 ? got.pop_front() : '0; nw++;
      check(w == {ID_TRAILER, TDC, hdr[23:12], 12'(nw)},
            $sformatf("trailer %h expected count %0d", w, nw));
    end
    check(got.size() == 0, "no extra words");
    trigs.delete();
    got.delete();
  endtask

  // random hits around cycle n0, a mask-window hit before it
  task automatic hits_around(int n0, int nh);
    int ch, n, k, len, base;
    base = $urandom_range(0, NCH-1);
    for (int i = 0; i < nh; i++) begin
      ch = (base + 5 * i) % NCH;              // distinct channels
      n = n0 + $urandom_range(0, 3);
      k = $urandom_range(0, 31);
      len = $urandom_range(8, 60);              // width in 0.78 ns bins
      pulse(ch, at(n, k), at(n + (k + len) / 32, (k + len) % 32));
    end
    ch = (base + 5 * nh) % NCH;
    pulse(ch, at(n0 - 3, 5), at(n0 - 3, 29));
  endtask

  task automatic wait_idle(int cycles);
    repeat (cycles) @(posedge clk);
    while (!dut.trg_empty || dut.tm_busy || !dut.ro_empty || dut.s_busy) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask

  // ---------------- JTAG --------------------------------------------------
  task automatic jtck(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #50000 tck = 1;
    o = tdo;            // tdo changed at the previous falling edge
    #50000 tck = 0;
  endtask
  task automatic jtag_ir(logic [3:0] ir);
    logic o;
    jtck(0, 0, o); jtck(1, 0, o); jtck(1, 0, o); jtck(0, 0, o); jtck(0, 0, o);
    for (int i = 0; i < 4; i++) jtck(i == 3, ir[i], o);
    jtck(1, 0, o); jtck(0, 0, o);      // update-IR, run-test/idle
  endtask
  task automatic jtag_dr(int len, input logic [179:0] din, output logic [179:0] dq);
    logic o;
    dq = '0;
    jtck(1, 0, o); jtck(0, 0, o); jtck(0, 0, o);   // select, capture, shift
    for (int i = 0; i < len; i++) begin
      jtck(i == len-1, din[i], o);
      dq[i] = o;
    end
    jtck(1, 0, o); jtck(0, 0, o);
  endtask

  // ---------------- stimulus ----------------------------------------------
  logic [11:0] rv;
  logic [179:0] jq;
  int n0, ncyc;

  initial begin
    // two reset pulses: the first puts the internally generated core reset
    // into a known state, the second gives it a falling edge for the
    // flip-flops clocked by the hit inputs, which see no other clock
    repeat (2) begin
      #1 rst_n = 0; trst_n = 0;
      repeat (4) @(posedge clk);
      rst_n = 1; trst_n = 1;
      repeat (4) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    check(pll_locked, "PLL locked");

    // configuration through the register bus
    csr_write(1, 12'(MSK));  csr_write(2, 12'(SW)); csr_write(3, 12'(MW));
    csr_write(4, 12'(ROFF)); csr_write(5, 12'(EOFF)); csr_write(6, 12'(BOFF));
    csr_write(7, 12'(COFF)); csr_write(8, 12'hFFF);
    csr_write(9, {8'h00, TDC});
    csr_write(10, 12'h333);
    csr_read(7, rv); check(rv == 12'(COFF), "CSR7 read back");
    csr_read(9, rv); check(rv == {8'h00, TDC}, "CSR9 read back");

    // bunch and event count reset, sampled at the same edge
    @(negedge clk); bunch_reset = 1; event_reset = 1;
    @(posedge clk); t_e = $time + TCLK;
    @(negedge clk); bunch_reset = 0; event_reset = 0;
    get_data = 1;

    // ---- phase A: leading + trailing edges, mask flags ----
    for (int j = 0; j < 6; j++) begin
      n0 = 20 + j * 30;
      hits_around(n0, 6);
      send_trigger(n0 + LAT + 1);
    end
    ncyc = 20 + 6 * 30 + LAT + 10;
    repeat (ncyc) @(posedge clk);
    wait_idle(10);
    check_events(0, 0);
    pulses.delete(); edges.delete();

    // ---- phase B: pair words, relative time ----
    csr_write(10, 12'h3B4 | 12'h080);         // pair + relative
    n0 = ((int'($time) - int'(t_e)) / TCLK) + 20;
    for (int j = 0; j < 4; j++) begin
      hits_around(n0 + j * 30, 5);
      send_trigger(n0 + j * 30 + LAT + 1);
    end
    repeat (4 * 30 + LAT + 30) @(posedge clk);
    wait_idle(10);
    check_events(1, 1);
    pulses.delete(); edges.delete();

    // ---- phase C: serial read-out, DS protocol, 40 Mbit/s ----
    csr_write(10, 12'h333);
    csr_write(9, {2'b00, 2'b01, 3'b000, 1'b0, TDC});
    csr_write(10, 12'h373);                   // + enb_serial
    use_serial = 1;
    n0 = ((int'($time) - int'(t_e)) / TCLK) + 20;
    for (int j = 0; j < 3; j++) begin
      hits_around(n0 + j * 40, 4);
      send_trigger(n0 + j * 40 + LAT + 1);
    end
    repeat (3 * 40 + LAT + 30) @(posedge clk);
    wait_idle(100);
    check_events(0, 0);
    use_serial = 0;
    csr_write(10, 12'h333);
    csr_write(9, {8'h00, TDC});
    pulses.delete(); edges.delete();

    // ---- phase D: automatic reject ----
    csr_write(10, 12'hB33);                   // + enb_auto_reject
    n0 = ((int'($time) - int'(t_e)) / TCLK) + 10;
    for (int j = 0; j < 8; j++)
      pulse($urandom_range(0, NCH-1), at(n0 + j, 3), at(n0 + j, 20));
    repeat (120) @(posedge clk);
    csr_read(17, rv);
    check(rv[11] == 1'b1, "L1 empty after automatic reject");
    if (rv[11]) n_reject++;
    foreach (edges[i]) edges[i].rejected = 1'b1;
    send_trigger(((int'($time) - int'(t_e)) / TCLK) + 5);  // too late: hits are gone
    repeat (LAT + 20) @(posedge clk);
    wait_idle(10);
    check_events(0, 0);
    pulses.delete(); edges.delete();
    csr_write(10, 12'h333);

    // ---- phase E: read-out blocked, FIFOs fill ----
    get_data = 0;
    n0 = ((int'($time) - int'(t_e)) / TCLK) + 5;
    for (int j = 0; j < 80; j++) trig_at(n0 + 2 * j);
    repeat (2 * 80 + 40) @(posedge clk);
    if (dut.ro_full) n_rofull++;
    check(dut.ro_full, "read-out FIFO full while blocked");
    csr_read(16, rv);
    check(rv[ERR_TRG_OVR] == 1'b1 && error, "trigger FIFO overflow flagged");
    if (rv[ERR_TRG_OVR]) n_trgovr++;
    get_data = 1;
    wait_idle(10);
    begin
      int nev = 0, last = -1; logic [31:0] w, h;
      while (got.size() >= 2) begin
        h = got.pop_front(); w = got.pop_front();
        check(h[31:28] == ID_HEADER && w[31:28] == ID_TRAILER &&
              w[23:12] == h[23:12] && w[11:0] == 12'd2, "empty event framing");
        check(int'(h[23:12]) > last, "event ids increase");
        last = int'(h[23:12]);
        nev++;
      end
      check(nev >= 32 && nev < 80, $sformatf("events kept while blocked: %0d", nev));
      check(got.size() == 0, "whole events only");
      got.delete();
      evcount += 80;
    end
    csr_write(0, 12'h400); csr_write(0, 12'h000);   // error_reset
    csr_read(16, rv);
    check(rv[8:0] == 0 && !error, "error flags cleared");

    // ---- phase F: JTAG ----
    jtag_ir(4'b0001);
    jtag_dr(32, '0, jq);
    check(jq[31:0] == 32'h1A71_0001, $sformatf("IDCODE %h", jq[31:0]));
    jtag_ir(4'b1000);
    jtag_dr(180, '0, jq);
    check(jq[7*12 +: 12] == 12'(COFF) && jq[9*12 +: 12] == {8'h00, TDC},
          "control chain read through JTAG");
    // the update wrote zeros: restore the registers through JTAG
    jtag_ir(4'b1000);
    jtag_dr(180, 180'(CTRL_RESET), jq);
    repeat (5) @(posedge clk);
    csr_read(10, rv); check(rv == 12'h333, "control written through JTAG");
    jtag_ir(4'b1010);
    jtag_dr(6, 180'd1, jq);                        // start self test
    repeat (12 * 256 + 100) @(posedge clk);
    jtag_dr(6, 180'd0, jq);
    check(jq[5:0] == 6'b000111, $sformatf("BIST done/fail %b", jq[5:0]));
    if (jq[2:0] == 3'b111) n_bist++;
    // pin sampling: hold a pattern on the hit inputs and read it back
    hit = 24'hA5_3C96;
    jtag_ir(4'b0010);
    jtag_dr(64, '0, jq);
    check(jq[23:0] == 24'hA5_3C96 && jq[27:24] == {get_data, event_reset, bunch_reset, trigger},
          $sformatf("SAMPLE of the pins %h", jq[63:0]));
    hit = '0;

    // ---- mechanisms ----
    check(n_lead > 0,   "leading-edge words seen");
    check(n_trail > 0,  "trailing-edge words seen");
    check(n_pair > 0,   "pair words seen");
    check(n_rel > 0,    "relative times seen");
    check(n_mask > 0,   "mask words seen");
    check(n_serial > 0, "serial packets seen");
    check(n_reject > 0, "automatic reject seen");
    check(n_rofull > 0, "read-out FIFO full seen");
    check(n_trgovr > 0, "trigger FIFO overflow seen");
    check(n_bist > 0,   "self test completed");
    $display("mechanisms: events=%0d lead=%0d trail=%0d pair=%0d rel=%0d mask=%0d serial=%0d reject=%0d rofull=%0d trgovr=%0d bist=%0d",
             n_events, n_lead, n_trail, n_pair, n_rel, n_mask, n_serial, n_reject, n_rofull, n_trgovr, n_bist);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
