// mbist: built-in self test controller for one on-chip memory (the L1 buffer,
// the trigger FIFO or the read-out FIFO; the chip has one per memory type).
//
// A start pulse runs the March C- algorithm over the whole array:
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// where 0 and 1 stand for all-zero and all-one words. While it runs, bist_en
// takes the memory's port away from normal operation. A read is issued in one
// cycle and its data (synchronous memory, one cycle latency) is compared in
// the next, while the write of the same address goes out. Any mismatch sets
// fail; done rises when the last read has been compared and both stay until
// the next start. A test of a DEPTH-word memory takes about 10*DEPTH cycles.
// The chip runs BIST on its memories through JTAG; the algorithm is this
// design's choice.
`timescale 1ps/1ps
module mbist #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 33,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          bist_en,
  output logic          bist_we,
  output logic [AW-1:0] bist_addr,
  output logic [DW-1:0] bist_wdata,
  input  logic [DW-1:0] bist_rdata,
  output logic          done,
  output logic          fail
);

  logic          running;
  logic [2:0]    elem;
  logic          phase;        // 0: read, 1: write
  logic [AW-1:0] addr;
  logic          cmp_valid;
  logic [DW-1:0] cmp_exp;

  // per element: does it read, which value it reads, does it write, which
  // value, address direction
  logic has_rd, rd_val, has_wr, wr_val, down;
  always_comb begin
    has_rd = 1'b1; has_wr = 1'b1; rd_val = 1'b0; wr_val = 1'b0; down = 1'b0;
    unique case (elem)
      3'd0: begin has_rd = 1'b0; wr_val = 1'b0; end
      3'd1: begin rd_val = 1'b0; wr_val = 1'b1; end
      3'd2: begin rd_val = 1'b1; wr_val = 1'b0; end
      3'd3: begin rd_val = 1'b0; wr_val = 1'b1; down = 1'b1; end
      3'd4: begin rd_val = 1'b1; wr_val = 1'b0; down = 1'b1; end
      default: begin rd_val = 1'b0; has_wr = 1'b0; end
    endcase
  end

  logic do_rd, do_wr, addr_done;
  assign do_rd = running && has_rd && !phase;
  assign do_wr = running && has_wr && (phase || !has_rd);
  assign addr_done = running && (!has_wr || phase || !has_rd);

  assign bist_en    = running || cmp_valid;
  assign bist_we    = do_wr;
  assign bist_addr  = addr;
  assign bist_wdata = {DW{wr_val}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; elem <= '0; phase <= 1'b0; addr <= '0;
      cmp_valid <= 1'b0; cmp_exp <= '0; done <= 1'b0; fail <= 1'b0;
    end else begin
      cmp_valid <= do_rd;
      cmp_exp   <= {DW{rd_val}};
      if (cmp_valid && bist_rdata != cmp_exp) fail <= 1'b1;
      if (start && !running) begin
        running <= 1'b1; elem <= '0; phase <= 1'b0; addr <= '0;
        done <= 1'b0; fail <= 1'b0;
      end else if (running) begin
        if (do_rd && has_wr) phase <= 1'b1;
        if (addr_done) begin
          phase <= 1'b0;
          if ((down && addr == 0) || (!down && addr == AW'(DEPTH-1))) begin
            if (elem == 3'd5) begin
              running <= 1'b0;
            end else begin
              elem <= elem + 1'b1;
              // elements 3 and 4 run downwards
              addr <= (elem == 3'd2 || elem == 3'd3) ? AW'(DEPTH-1) : '0;
            end
          end else begin
            addr <= down ? addr - 1'b1 : addr + 1'b1;
          end
        end
      end
      if (cmp_valid && !running && !do_rd) done <= 1'b1;
    end
  end

endmodule
