// tb_mbist: checks the March C- memory self-test controller.
//
// The bench holds a synchronous RAM model (one-cycle read latency, as the
// chip's memories have here) that the controller drives. A fault-free run
// must end with done=1, fail=0 after the March C- length (10 operations per
// word: about 10*DEPTH cycles, checked within a small margin) and leave the
// memory all zero. The bench also records every write and compares the
// sequence with the March C- write order (addresses up or down, all-zero or
// all-one data). Runs with a stuck-at-0 or stuck-at-1 bit at random
// addresses and bit positions, and with a coupling fault (writing one address
// flips another), must each end with fail=1. A later start must clear fail
// and done.
`timescale 1ps/1ps
module tb_mbist;
  localparam int unsigned DEPTH = 64, DW = 33;
  logic clk = 0, rst_n = 1, start = 0;
  logic bist_en, bist_we, done, fail;
  logic [5:0] bist_addr;
  logic [DW-1:0] bist_wdata, bist_rdata;
  int checks = 0, failures = 0;

  mbist #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #12500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [DW-1:0] mem [DEPTH];
  int stuck_addr = -1, stuck_bit = 0, cpl_a = -1, cpl_v = 0;
  logic stuck_val = 1'b1;
  int wr_addr [$];
  logic [DW-1:0] wr_data [$];
  always @(posedge clk) begin
    if (bist_en && bist_we) begin
      wr_addr.push_back(int'(bist_addr));
      wr_data.push_back(bist_wdata);
      mem[bist_addr] <= bist_wdata;
      if (int'(bist_addr) == cpl_a) mem[cpl_v][0] <= ~mem[cpl_v][0];
    end
    bist_rdata <= mem[bist_addr];
    if (stuck_addr >= 0 && int'(bist_addr) == stuck_addr) bist_rdata[stuck_bit] <= stuck_val;
  end

  task automatic run(output int cyc);
    wr_addr.delete(); wr_data.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 20 * DEPTH) begin @(posedge clk); #1 cyc++; end
  endtask

  initial begin
    int cyc;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < DEPTH; i++) mem[i] = {$urandom, 1'b1};
    run(cyc);
    check(done && !fail, "good memory passes");
    check(cyc >= 10 * DEPTH - 2 && cyc <= 10 * DEPTH + 8, $sformatf("test length %0d cycles", cyc));
    begin
      bit allz = 1;
      for (int i = 0; i < DEPTH; i++) if (mem[i] != '0) allz = 0;
      check(allz, "memory left all zero");
    end
    check(!bist_en, "memory released after the test");
    // write order: up(w0) up(w1) up(w0) down(w1) down(w0)
    check(wr_addr.size() == 5 * DEPTH, $sformatf("%0d writes", wr_addr.size()));
    for (int e = 0; e < 5; e++)
      for (int i = 0; i < DEPTH; i++) begin
        int k = e * DEPTH + i;
        int a = (e >= 3) ? DEPTH - 1 - i : i;
        logic [DW-1:0] v = (e == 1 || e == 3) ? '1 : '0;
        if (k < wr_addr.size())
          check(wr_addr[k] == a && wr_data[k] == v,
                $sformatf("write %0d: addr %0d data %h", k, wr_addr[k], wr_data[k]));
      end
    // stuck-at bits in the read path at one address
    for (int n = 0; n < 16; n++) begin
      stuck_addr = $urandom_range(0, DEPTH - 1);
      stuck_bit  = $urandom_range(0, DW - 1);
      stuck_val  = n[0];
      run(cyc);
      check(done && fail, $sformatf("stuck-at-%0d at %0d bit %0d detected",
                                    stuck_val, stuck_addr, stuck_bit));
    end
    stuck_addr = -1;
    run(cyc);
    check(done && !fail, "good memory passes again");
    // coupling fault: a write to address 9 flips bit 0 of address 40
    cpl_a = 9; cpl_v = 40;
    run(cyc);
    check(done && fail, "coupling fault detected");
    cpl_a = -1;
    run(cyc);
    check(done && !fail, "fail cleared by a new start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2_000_000_000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
