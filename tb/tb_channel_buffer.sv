// tb_channel_buffer: checks the 4-word hit buffer of one channel.
//
// The bench drives the tap and counter inputs with a new random "time" just
// before each hit edge and remembers it. Hits are pulses on the hit input,
// asynchronous to the 40 MHz read clock. The bench then checks:
//   - a complete hit becomes valid within 3 read-clock cycles of its
//     trailing edge (two synchroniser stages),
//   - the word read holds the leading and trailing values in order,
//   - a fifth hit into a full buffer is lost and gives one overflow pulse,
//   - a disabled channel ignores its input.
`timescale 1ps/1ps
module tb_channel_buffer;
  import amt_pkg::*;
  logic hit = 0, enable = 1, clk = 0, rst_n = 1, rd = 0;
  logic [NTAP-1:0] taps = '0;
  logic [COARSE_W-1:0] cnt_a = '0, cnt_b = '0;
  logic par_a = 0, par_b = 0;
  logic valid, overflow;
  hit_raw_t word;
  int checks = 0, failures = 0, n_ovr = 0;

  channel_buffer #(.DEPTH(4)) dut (.*);

  always #12500 clk = ~clk;
  always @(posedge clk) if (overflow) n_ovr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  edge_raw_t q_lead[$], q_trail[$];

  function automatic edge_raw_t rnd();
    edge_raw_t e;
    e.taps = NTAP'($urandom); e.cnt_a = COARSE_W'($urandom); e.cnt_b = COARSE_W'($urandom);
    e.par_a = ^e.cnt_a; e.par_b = ^e.cnt_b;
    return e;
  endfunction

  task automatic drive(edge_raw_t e);
    taps = e.taps; cnt_a = e.cnt_a; cnt_b = e.cnt_b; par_a = e.par_a; par_b = e.par_b;
  endtask

  // one pulse; store = the buffer is expected to accept it
  task automatic one_hit(bit store);
    edge_raw_t l, t;
    l = rnd(); t = rnd();
    drive(l); #($urandom_range(200, 900)) hit = 1;
    #($urandom_range(100, 400)) drive(t);
    #($urandom_range(500, 3000)) hit = 0;
    if (store) begin q_lead.push_back(l); q_trail.push_back(t); end
  endtask

  task automatic read_all(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      check(valid, "word valid");
      if (valid && q_lead.size() > 0) begin
        check(word.lead == q_lead.pop_front() && word.trail == q_trail.pop_front(),
              "word content");
      end
      rd = 1; @(negedge clk); rd = 0;
    end
    @(negedge clk);
    check(!valid, "buffer empty after reading");
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    check(!valid && !overflow, "empty after reset");

    // latency: valid within 3 clk cycles of the trailing edge
    for (int k = 0; k < 20; k++) begin
      int cyc;
      #($urandom_range(0, 24000));
      one_hit(1);
      cyc = 0;
      while (!valid && cyc < 10) begin @(posedge clk); #1 cyc++; end
      check(valid && cyc <= 3, $sformatf("valid after %0d cycles", cyc));
      read_all(1);
    end

    // bursts of up to 4 hits fill the buffer without loss
    for (int k = 0; k < 20; k++) begin
      int n = $urandom_range(1, 4);
      for (int i = 0; i < n; i++) begin one_hit(1); #($urandom_range(100, 5000)); end
      repeat (4) @(posedge clk);
      read_all(n);
    end
    check(n_ovr == 0, "no overflow below 4 words");

    // a fifth hit is lost
    for (int i = 0; i < 5; i++) begin one_hit(i < 4); #2000; end
    repeat (5) @(posedge clk);
    check(n_ovr == 1, $sformatf("one overflow pulse, saw %0d", n_ovr));
    read_all(4);

    // disabled channel
    enable = 0;
    one_hit(0);
    repeat (5) @(posedge clk);
    check(!valid, "disabled channel stores nothing");
    enable = 1;

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
