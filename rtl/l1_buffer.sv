// l1_buffer: the level 1 buffer, 256 hit words written like a circular
// buffer and read at random.
//
// The encoder writes words at the write pointer. The trigger matching owns
// the start pointer (oldest word still needed) and reads any address through
// rd_addr; read data and its parity check appear one cycle after rd_en and
// hold until the next read. Each
// word is stored with an even parity bit so that a single event upset is seen
// on read (rd_parity_error). Pointers are one bit wider than the address so
// that a full buffer (DEPTH words between start and write pointer) differs
// from an empty one. A word written to a full buffer is dropped and sets the
// sticky overflow flag; over_recover is set once the occupancy has fallen
// below the nearly-full mark after an overflow. Both clear with err_clear.
// nearly_full is high from NEARLY words on. For the built-in self test,
// bist_en hands the storage array to the test controller.
// Depth (256) and random-access reading are the chip's; parity handling,
// flags and the nearly-full mark are this design's choices.
`timescale 1ps/1ps
module l1_buffer
  import amt_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned NEARLY = 224,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned DW    = $bits(l1_word_t) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  l1_word_t      wdata,
  input  logic [AW:0]   start_ptr,
  input  logic          rd_en,
  input  logic [AW:0]   rd_addr,
  output l1_word_t      rdata,
  output logic          rd_parity_error,
  output logic [AW:0]   wr_ptr,
  output logic [AW:0]   occupancy,
  output logic          empty,
  output logic          full,
  output logic          nearly_full,
  output logic          overflow,
  output logic          over_recover,
  input  logic          err_clear,
  input  logic          bist_en,
  input  logic          bist_we,
  input  logic [AW-1:0] bist_addr,
  input  logic [DW-1:0] bist_wdata,
  output logic [DW-1:0] bist_rdata
);

  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] q;
  logic          rd_q;

  assign occupancy   = wr_ptr - start_ptr;
  assign empty       = (occupancy == 0);
  assign full        = (occupancy == (AW+1)'(DEPTH));
  assign nearly_full = (occupancy >= (AW+1)'(NEARLY));

  logic          m_we;
  logic [AW-1:0] m_waddr, m_raddr;
  logic [DW-1:0] m_wdata;

  always_comb begin
    if (bist_en) begin
      m_we = bist_we; m_waddr = bist_addr; m_raddr = bist_addr; m_wdata = bist_wdata;
    end else begin
      m_we = we && !full; m_waddr = wr_ptr[AW-1:0]; m_raddr = rd_addr[AW-1:0];
      m_wdata = {^wdata, wdata};
    end
  end

  always_ff @(posedge clk) begin
    if (m_we) mem[m_waddr] <= m_wdata;
    if (bist_en || rd_en) q <= mem[m_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      overflow     <= 1'b0;
      over_recover <= 1'b0;
      rd_q         <= 1'b0;
    end else begin
      rd_q <= rd_en && !bist_en;
      if (!bist_en && we) begin
        if (!full) wr_ptr   <= wr_ptr + 1'b1;
        else       overflow <= 1'b1;
      end
      if (overflow && !nearly_full) over_recover <= 1'b1;
      if (err_clear) begin
        overflow     <= 1'b0;
        over_recover <= 1'b0;
      end
    end
  end

  assign rdata           = l1_word_t'(q[DW-2:0]);
  assign rd_parity_error = rd_q && (^q);
  assign bist_rdata      = q;

endmodule
