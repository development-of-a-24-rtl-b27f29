// csr: the 15 control registers (CSR0..CSR14) and the read access to the 6
// status registers (CSR16..CSR21), all 12 bits wide.
//
// Control registers are written from the 12-bit bus (addr, wr, wdata, one
// write per clk cycle) or loaded all at once from the JTAG control chain
// (jtag_load with jtag_ctrl). Bus reads are combinational: addresses 0..14
// return control registers, 16..21 the status words assembled by the chip
// (stat), everything else zero. The decoded fields go out as cfg.
//
// A single parity bit over all 180 control bits is computed whenever the
// registers are written and kept apart. If a stored bit later flips without a
// write (a single event upset), the recomputed parity no longer matches and
// control_parity stays high until the registers are written again.
// Hardware reset loads the defaults CTRL_RESET. The register map and the
// total parity are the chip's; the bus timing and the reset values are this
// design's choices.
`timescale 1ps/1ps
module csr
  import amt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        addr,
  input  logic              wr,
  input  logic [REG_W-1:0]  wdata,
  output logic [REG_W-1:0]  rdata,
  input  logic              jtag_load,
  input  ctrl_regs_t        jtag_ctrl,
  input  stat_regs_t        stat,
  output ctrl_regs_t        ctrl,
  output amt_cfg_t          cfg,
  output logic              control_parity
);

  ctrl_regs_t regs, regs_next;
  logic       par_q;

  always_comb begin
    regs_next = regs;
    if (jtag_load)
      regs_next = jtag_ctrl;
    else if (wr && addr < 5'(NCTRL))
      regs_next[addr[3:0]] = wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs  <= CTRL_RESET;
      par_q <= ^CTRL_RESET;
    end else if (jtag_load || wr) begin
      regs  <= regs_next;
      par_q <= ^regs_next;
    end
  end

  always_comb begin
    rdata = '0;
    if (addr < 5'(NCTRL))                     rdata = regs[addr[3:0]];
    else if (addr >= 5'd16 && addr <= 5'd21) rdata = stat[addr - 5'd16];
  end

  assign ctrl           = regs;
  assign cfg            = decode_cfg(regs);
  assign control_parity = (^regs) ^ par_q;

endmodule
