// trigger_fifo: the 8-word FIFO of accepted triggers waiting for the trigger
// matching.
//
// Each word holds the event count and the trigger time tag (12 bits each)
// and a 1-bit status, stored with an even parity bit. The head word is
// visible without a read cycle (first-word fall-through); pop removes it and
// parity_error flags an upset head word as it is popped. A trigger arriving
// while the FIFO is full is lost: the overflow flag is set (sticky until
// err_clear) and the status bit of the next trigger that is stored is set,
// so the read-out can tell that events are missing before it. nearly_full is
// high from NEARLY words on. bist_en hands the storage array to the built-in
// self test (synchronous read, one cycle). Depth and word fields are the
// chip's; the use of the status bit and the flags are this design's choices.
`timescale 1ps/1ps
module trigger_fifo
  import amt_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned NEARLY = 6,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned DW    = $bits(trig_word_t) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [BC_W-1:0] push_event_id,
  input  logic [BC_W-1:0] push_trig_time,
  input  logic          pop,
  output trig_word_t    head,
  output logic          parity_error,
  output logic          empty,
  output logic          full,
  output logic          nearly_full,
  output logic [AW:0]   occupancy,
  output logic          overflow,
  input  logic          err_clear,
  input  logic          bist_en,
  input  logic          bist_we,
  input  logic [AW-1:0] bist_addr,
  input  logic [DW-1:0] bist_wdata,
  output logic [DW-1:0] bist_rdata
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          lost_pending;
  trig_word_t    w;

  assign occupancy   = wp - rp;
  assign empty       = (wp == rp);
  assign full        = (occupancy == (AW+1)'(DEPTH));
  assign nearly_full = (occupancy >= (AW+1)'(NEARLY));
  assign w           = '{lost: lost_pending, event_id: push_event_id, trig_time: push_trig_time};
  assign head        = trig_word_t'(mem[rp[AW-1:0]][DW-2:0]);
  assign parity_error = pop && !empty && (^mem[rp[AW-1:0]]);

  always_ff @(posedge clk) begin
    if (bist_en) begin
      if (bist_we) mem[bist_addr] <= bist_wdata;
    end else if (push && !full) begin
      mem[wp[AW-1:0]] <= {^w, w};
    end
    bist_rdata <= mem[bist_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; lost_pending <= 1'b0; overflow <= 1'b0;
    end else if (!bist_en) begin
      if (push) begin
        if (!full) begin
          wp <= wp + 1'b1;
          lost_pending <= 1'b0;
        end else begin
          lost_pending <= 1'b1;
          overflow     <= 1'b1;
        end
      end
      if (pop && !empty) rp <= rp + 1'b1;
      if (err_clear) overflow <= 1'b0;
    end
  end

endmodule
