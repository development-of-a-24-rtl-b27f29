// readout_fifo: the 64-word FIFO between the trigger matching and the
// read-out interface.
//
// Words are 32 bits, a 4-bit ID followed by 28 data bits, stored with an even
// parity bit. The head word is visible without a read cycle; pop removes it
// and parity_error flags an upset head word as it is popped. Pushing into a
// full FIFO is refused (the trigger matching waits or rejects the word);
// occupancy, empty and full feed the status registers. bist_en hands the
// storage array to the built-in self test (synchronous read, one cycle).
// Depth and the ID + 28-bit split are the chip's; parity and flags are this
// design's choices.
`timescale 1ps/1ps
module readout_fifo #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 32,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned DW    = WIDTH + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             parity_error,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      occupancy,
  input  logic             bist_en,
  input  logic             bist_we,
  input  logic [AW-1:0]    bist_addr,
  input  logic [DW-1:0]    bist_wdata,
  output logic [DW-1:0]    bist_rdata
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wp, rp;

  assign occupancy    = wp - rp;
  assign empty        = (wp == rp);
  assign full         = (occupancy == (AW+1)'(DEPTH));
  assign head         = mem[rp[AW-1:0]][WIDTH-1:0];
  assign parity_error = pop && !empty && (^mem[rp[AW-1:0]]);

  always_ff @(posedge clk) begin
    if (bist_en) begin
      if (bist_we) mem[bist_addr] <= bist_wdata;
    end else if (push && !full) begin
      mem[wp[AW-1:0]] <= {^wdata, wdata};
    end
    bist_rdata <= mem[bist_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else if (!bist_en) begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end

endmodule
