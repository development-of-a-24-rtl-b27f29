// tb_amt_rate: hit-rate workload on the whole chip at its real sizes.
//
// All 24 channels receive random hits at an average of 400 kHz each (random
// exponential spacing, pulses 8-60 ns wide) for 40 us, about 380 hits, plus
// a few double hits 10 ns apart (5 ns pulse, 5 ns gap) to exercise the
// double-hit resolution. The chip is set to leading-edge words only with
// trigger matching off, so every stored hit is passed straight through the
// L1 buffer to the read-out FIFO and out of the parallel port. The bench
// computes each word (channel, 17-bit leading time) from the pulse time
// alone and requires every hit to come out exactly once: 100 % efficiency,
// no buffer overflow, no error flag. It also measures the longest time from
// a leading edge to its word appearing on the parallel port.
`timescale 1ps/1ps
module tb_amt_rate;
  import amt_pkg::*;

  localparam int unsigned TCLK = 25000;
  localparam int unsigned COFF = 256;
  localparam longint unsigned RUN_PS = 40_000_000;   // 40 us of hits
  localparam real MEAN_PS = 2_500_000.0;              // 400 kHz

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
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint unsigned t_e;
  function automatic logic [16:0] tdc_time(longint unsigned t);
    longint unsigned n, r; int unsigned k;
    n = (t - t_e) / TCLK; r = (t - t_e) % TCLK; k = 0;
    for (int unsigned j = 0; j < 32; j++) if ((j * TCLK) / 32 <= r) k = j;
    return 17'(2 * COFF * 16 + n * 32 + k);
  endfunction

  // expected words -> leading-edge time in ps
  longint unsigned expected [logic [31:0]];
  int n_hits = 0, n_double = 0, n_got = 0;
  longint unsigned max_lat = 0;

  task automatic pulse(int ch, longint unsigned tl, longint unsigned width);
    logic [31:0] w;
    fork begin
      #(tl - $time) hit[ch] = 1'b1;
      #(width)      hit[ch] = 1'b0;
    end join_none
    w = {ID_LEAD, 4'h0, 5'(ch), 2'b00, tdc_time(tl)};
    check(!expected.exists(w), "distinct hit words");
    expected[w] = tl;
    n_hits++;
  endtask

  task automatic csr_write(int a, logic [11:0] v);
    @(negedge clk); csr_addr = 5'(a); csr_wdata = v; csr_wr = 1;
    @(negedge clk); csr_wr = 0;
  endtask

  always @(negedge clk) begin
    #(TCLK/2 - 200);
    if (get_data && dready) begin
      check(expected.exists(dout), $sformatf("unexpected word %h", dout));
      if (expected.exists(dout)) begin
        if ($time - expected[dout] > max_lat) max_lat = $time - expected[dout];
        expected.delete(dout);
      end
      n_got++;
    end
  end

  initial begin
    logic [11:0] rv;
    repeat (2) begin
      #1 rst_n = 0; trst_n = 0;
      repeat (4) @(posedge clk);
      rst_n = 1; trst_n = 1;
      repeat (4) @(posedge clk);
    end
    csr_write(7, 12'(COFF));
    csr_write(10, 12'h001);                 // leading edges only, matching off
    @(negedge clk); bunch_reset = 1;
    @(posedge clk); t_e = $time + TCLK;
    @(negedge clk); bunch_reset = 0;
    get_data = 1;

    for (int ch = 0; ch < NCH; ch++) begin
      longint unsigned t, w;
      t = t_e + 100_000 + longint'($urandom_range(0, 2_000_000));
      while (t < t_e + RUN_PS) begin
        if ($urandom_range(0, 19) == 0) begin
          pulse(ch, t, 5000);                // double hit: 10 ns apart
          pulse(ch, t + 10000, 5000);
          n_double++;
          t += 15000;
        end else begin
          w = longint'($urandom_range(8000, 60000));
          pulse(ch, t, w);
          t += w;
        end
        // exponential spacing, at least 10 ns of gap
        t += 10000 + longint'(-MEAN_PS * $ln(1.0 - real'($urandom_range(0, 999_999)) / 1.0e6));
      end
    end

    #(RUN_PS + 2_000_000);
    check(expected.size() == 0, $sformatf("%0d of %0d hits missing", expected.size(), n_hits));
    check(n_got == n_hits, "one word per hit");
    check(!error, "no error flag");
    @(negedge clk); csr_addr = 5'd16; #1 rv = csr_rdata;
    check(rv[8:0] == 0, $sformatf("error flags %b", rv[8:0]));
    check(n_hits > 300 && n_double > 0, "workload size");
    check(max_lat < 2_000_000, $sformatf("hit to read-out latency %0d ps", max_lat));
    $display("rate: %0d hits (%0d double hits) over 40 us on 24 channels, read %0d words, max latency %0d ns",
             n_hits, n_double, n_got, max_lat / 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
