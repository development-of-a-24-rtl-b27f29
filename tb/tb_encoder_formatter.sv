// tb_encoder_formatter: checks the fine/coarse time encoding and the L1 word
// formats.
//
// For each hit the bench picks a coarse count c and a fine bin j for each
// edge and builds the raw values the channel buffer would have latched: the
// tap pattern of bin j, counter A = c (garbage outside bins 4..11, where the
// encoder must not use it) and counter B = c for bins 8..15, c-1 for bins
// 0..7 (garbage for bins 4..7). The expected edge time is {c, j}. The bench
// checks leading/trailing words, pair words with the scaled and saturated
// width, the one-word-per-cycle rate (a hit giving two words takes two
// cycles), wrap-around of B+1 at the roll-over, and the parity error pulse.
`timescale 1ps/1ps
module tb_encoder_formatter;
  import amt_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [CH_W-1:0] in_ch = '0;
  hit_raw_t in_word = '0;
  logic enb_leading = 1, enb_trailing = 1, enb_pair = 0, disable_encode = 0;
  logic [2:0] width_select = '0;
  logic [BC_W-1:0] roll_over = '1;
  logic ready, l1_we, parity_error;
  l1_word_t l1_word;
  int checks = 0, failures = 0, n_perr = 0;

  encoder_formatter dut (.*);

  always #12500 clk = ~clk;
  always @(posedge clk) if (parity_error) n_perr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [NTAP-1:0] tap_pattern(int j);
    logic [NTAP-1:0] t;
    for (int i = 0; i < NTAP; i++) t[i] = (((j - i + NTAP) % NTAP) < NTAP/2);
    return t;
  endfunction

  function automatic edge_raw_t raw(logic [COARSE_W-1:0] c, int j);
    edge_raw_t e;
    e.taps  = tap_pattern(j);
    e.cnt_a = (j >= 4 && j <= 11) ? c : COARSE_W'($urandom);
    if (j >= 8)      e.cnt_b = c;
    else if (j < 4)  e.cnt_b = (c == 0) ? {roll_over, 1'b1} : c - 1'b1;
    else             e.cnt_b = COARSE_W'($urandom);
    e.par_a = ^e.cnt_a; e.par_b = ^e.cnt_b;
    return e;
  endfunction

  l1_word_t exp_q[$];
  always @(posedge clk) begin
    #1;
    if (l1_we) begin
      l1_word_t e;
      check(exp_q.size() > 0, "unexpected L1 word");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(l1_word == e, $sformatf("L1 word %h expected %h", l1_word, e));
      end
    end
  end

  task automatic send(logic [TIME_W-1:0] tl, logic [TIME_W-1:0] tt, int ch);
    logic [TIME_W-1:0] w;
    @(negedge clk);
    while (!ready) @(negedge clk);
    in_word.lead  = raw(tl[16:4], int'(tl[3:0]));
    in_word.trail = raw(tt[16:4], int'(tt[3:0]));
    in_ch = CH_W'(ch); in_valid = 1;
    w = (tt - tl) >> width_select;
    if (enb_pair) exp_q.push_back('{L1_PAIR, CH_W'(ch), (w > 255) ? 8'hFF : w[7:0], tl});
    else begin
      if (enb_leading)  exp_q.push_back('{L1_LEAD,  CH_W'(ch), 8'h00, tl});
      if (enb_trailing) exp_q.push_back('{L1_TRAIL, CH_W'(ch), 8'h00, tt});
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    logic [TIME_W-1:0] tl;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // leading + trailing words, every fine bin
    for (int k = 0; k < 200; k++) begin
      tl = TIME_W'($urandom_range(32, 100000));
      send(tl, tl + TIME_W'($urandom_range(5, 300)), $urandom_range(0, 23));
    end
    // leading only, trailing only
    enb_trailing = 0;
    for (int k = 0; k < 30; k++) begin tl = TIME_W'($urandom); send(tl, tl + 17'd40, k % 24); end
    enb_trailing = 1; enb_leading = 0;
    for (int k = 0; k < 30; k++) begin tl = TIME_W'($urandom); send(tl, tl + 17'd40, k % 24); end
    enb_leading = 1;
    // pair words with width scaling and saturation
    enb_pair = 1;
    for (int s = 0; s < 4; s++) begin
      width_select = 3'(s);
      for (int k = 0; k < 40; k++) begin
        tl = TIME_W'($urandom_range(0, 120000));
        send(tl, tl + TIME_W'($urandom_range(1, 1500)), k % 24);
      end
    end
    enb_pair = 0; width_select = 0;
    // rate: a stream of hits giving two words each takes two cycles per hit
    begin
      longint t0; int n0;
      repeat (3) @(posedge clk);
      #1 t0 = $time;
      for (int k = 0; k < 50; k++) begin
        tl = TIME_W'($urandom_range(32, 100000));
        send(tl, tl + 17'd77, 3);
      end
      check(($time - t0) / 25000 <= 101 && ($time - t0) / 25000 >= 99,
            $sformatf("two words per hit at one word per cycle: %0d cycles", ($time - t0) / 25000));
    end
    // B + 1 wraps to zero at the roll-over
    roll_over = 12'd99;
    tl = {13'd0, 4'd2};
    send(tl, tl + 17'd6, 5);
    roll_over = '1;
    // bad parity on the counter in use
    repeat (3) @(posedge clk);
    @(negedge clk);
    in_word.lead  = raw(13'd500, 6);
    in_word.lead.par_a = ~in_word.lead.par_a;
    in_word.trail = raw(13'd501, 6);
    in_ch = 0; in_valid = 1;
    exp_q.push_back('{L1_LEAD,  5'd0, 8'h00, {13'd500, 4'd6}});
    exp_q.push_back('{L1_TRAIL, 5'd0, 8'h00, {13'd501, 4'd6}});
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    check(n_perr == 1, $sformatf("one parity error, saw %0d", n_perr));
    check(exp_q.size() == 0, "all expected words written");
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
