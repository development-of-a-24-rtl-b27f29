// tb_l1_buffer: checks the 256-word level-1 buffer.
//
// Words are written in a stream while the bench moves the start pointer
// (the oldest word still needed) forward at random. Random reads of any
// address between the start and write pointers must return the stored word
// exactly one cycle later and hold it until the next read. The bench checks
// occupancy, empty, nearly_full (224 words) and full (256), that a write into
// a full buffer is dropped and sets overflow, that over_recover rises once
// the buffer has drained below nearly full, that err_clear clears both, and
// that an upset word (written through the self-test port) gives a read
// parity error.
`timescale 1ps/1ps
module tb_l1_buffer;
  import amt_pkg::*;
  localparam int unsigned DEPTH = 256;
  logic clk = 0, rst_n = 1, we = 0, rd_en = 0, err_clear = 0;
  l1_word_t wdata = '0, rdata;
  logic [8:0] start_ptr = '0, rd_addr = '0, wr_ptr, occupancy;
  logic rd_parity_error, empty, full, nearly_full, overflow, over_recover;
  logic bist_en = 0, bist_we = 0;
  logic [7:0] bist_addr = '0;
  logic [32:0] bist_wdata = '0, bist_rdata;
  int checks = 0, failures = 0;

  l1_buffer #(.DEPTH(DEPTH), .NEARLY(224)) dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  l1_word_t model [DEPTH];
  int unsigned wp = 0, sp = 0;
  l1_word_t exp_r; bit exp_v = 0;

  task automatic cycle(bit do_we, bit do_rd, int unsigned addr);
    @(negedge clk);
    check(int'(occupancy) == int'(wp - sp) && empty == (wp == sp) &&
          full == (wp - sp == DEPTH) && nearly_full == (wp - sp >= 224),
          $sformatf("flags occ %0d model %0d", occupancy, wp - sp));
    check(wr_ptr == 9'(wp), "write pointer");
    if (exp_v) check(rdata == exp_r, "read data held");
    we = do_we; wdata = l1_word_t'({$urandom, 1'b0});
    rd_en = do_rd; rd_addr = 9'(addr);
    @(posedge clk);
    if (do_we && (wp - sp) < DEPTH) begin model[wp % DEPTH] = wdata; wp++; end
    if (do_rd) begin exp_r = model[addr % DEPTH]; exp_v = 1; end
    #1;
    if (do_rd) begin
      check(rdata == exp_r, $sformatf("read data %h expected %h", rdata, exp_r));
      check(!rd_parity_error, "no parity error");
    end
    we = 0; rd_en = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // streaming with random reads and a moving start pointer
    for (int c = 0; c < 3000; c++) begin
      int unsigned a;
      a = (wp > sp) ? sp + $urandom_range(0, wp - sp - 1) : sp;
      cycle($urandom_range(0, 1), (wp > sp) && $urandom_range(0, 1), a);
      if (wp - sp > 20 && $urandom_range(0, 1)) begin
        sp += $urandom_range(1, 3); start_ptr = 9'(sp);
      end
    end
    // fill to full, then one more write
    sp = wp; start_ptr = 9'(sp);
    for (int i = 0; i < DEPTH; i++) cycle(1, 0, 0);
    check(full && !overflow, "full, no overflow yet");
    cycle(1, 0, 0);
    check(overflow && !over_recover, "write into full buffer sets overflow");
    for (int i = 0; i < DEPTH; i++) cycle(0, 1, sp + i);
    // drain below nearly full
    sp += 40; start_ptr = 9'(sp);
    repeat (2) @(posedge clk);
    #1 check(overflow && over_recover, "over_recover after draining");
    err_clear = 1; @(posedge clk); #1 err_clear = 0;
    check(!overflow && !over_recover, "err_clear");
    // parity upset of the word at the start pointer
    @(negedge clk);
    bist_en = 1; bist_we = 1; bist_addr = 8'(sp); bist_wdata = {^model[sp % DEPTH], model[sp % DEPTH]};
    bist_wdata[3] = ~bist_wdata[3];
    @(negedge clk); bist_we = 0; bist_en = 0;
    rd_en = 1; rd_addr = 9'(sp);
    @(posedge clk); #1 check(rd_parity_error, "read parity error on upset word");
    rd_en = 0;
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
