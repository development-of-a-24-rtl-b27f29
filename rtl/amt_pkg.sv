// amt_pkg: sizes, word formats and the control-register map shared by the
// AMT 24-channel TDC.
//
// The sizes (24 channels, 16 ring-oscillator taps, 13-bit coarse count, 17-bit
// time, 256-word level 1 buffer, 8-word trigger FIFO, 64-word read-out FIFO,
// 12-bit registers) and the bit assignment of the control and status registers
// follow the chip's specification. The L1 word is status(2) channel(5)
// width(8) edge time(17) as in the chip's block diagram; the meaning of the
// status bits, the 4-bit ID codes of the read-out words and the packing of the
// 28 data bits behind the ID are this design's own choices.
`timescale 1ps/1ps
package amt_pkg;

  localparam int unsigned NCH       = 24;   // hit channels
  localparam int unsigned NTAP      = 16;   // ring oscillator taps
  localparam int unsigned COARSE_W  = 13;   // coarse counter bits (80 MHz)
  localparam int unsigned TIME_W    = 17;   // edge time = coarse & fine
  localparam int unsigned CH_W      = 5;    // channel identifier
  localparam int unsigned WIDTH_W   = 8;    // pulse width field
  localparam int unsigned BC_W      = 12;   // bunch / trigger time / event counters
  localparam int unsigned REG_W     = 12;   // control and status register width
  localparam int unsigned NCTRL     = 15;   // CSR0..CSR14
  localparam int unsigned NSTAT     = 6;    // CSR16..CSR21
  localparam int unsigned NERR      = 9;    // error flags in CSR16[8:0]

  // Raw time stamp of one edge as latched in a channel buffer: tap state and
  // both coarse counters with their parity bits.
  typedef struct packed {
    logic [NTAP-1:0]     taps;
    logic [COARSE_W-1:0] cnt_a;
    logic                par_a;
    logic [COARSE_W-1:0] cnt_b;
    logic                par_b;
  } edge_raw_t;

  typedef struct packed {
    edge_raw_t lead;
    edge_raw_t trail;
  } hit_raw_t;

  // L1 buffer word. Status: 01 leading edge, 10 trailing edge, 11 pair
  // (leading edge time plus pulse width).
  typedef enum logic [1:0] {
    L1_NONE  = 2'b00,
    L1_LEAD  = 2'b01,
    L1_TRAIL = 2'b10,
    L1_PAIR  = 2'b11
  } l1_type_e;

  typedef struct packed {
    l1_type_e            status;
    logic [CH_W-1:0]     channel;
    logic [WIDTH_W-1:0]  width;
    logic [TIME_W-1:0]   edge_time;
  } l1_word_t;

  // Trigger FIFO word: status (triggers were lost before this one), event
  // count, trigger time tag.
  typedef struct packed {
    logic            lost;
    logic [BC_W-1:0] event_id;
    logic [BC_W-1:0] trig_time;
  } trig_word_t;

  // Read-out word identifiers (upper four bits of every 32-bit word).
  localparam logic [3:0] ID_HEADER  = 4'b1010;
  localparam logic [3:0] ID_TRAILER = 4'b1100;
  localparam logic [3:0] ID_LEAD    = 4'b0011;
  localparam logic [3:0] ID_TRAIL   = 4'b0100;
  localparam logic [3:0] ID_PAIR    = 4'b0101;
  localparam logic [3:0] ID_MASK    = 4'b0010;
  localparam logic [3:0] ID_ERROR   = 4'b0110;

  // Error flag positions (CSR16[8:0], enabled by CSR12[8:0]).
  localparam int unsigned ERR_COARSE_PAR = 0;
  localparam int unsigned ERR_CHBUF_OVR  = 1;
  localparam int unsigned ERR_L1_PAR     = 2;
  localparam int unsigned ERR_TRG_PAR    = 3;
  localparam int unsigned ERR_RO_PAR     = 4;
  localparam int unsigned ERR_L1_OVR     = 5;
  localparam int unsigned ERR_TRG_OVR    = 6;
  localparam int unsigned ERR_RO_OVR     = 7;
  localparam int unsigned ERR_CTRL_PAR   = 8;

  // Decoded control registers (Table of CSR0..CSR14).
  typedef struct packed {
    // CSR0
    logic        global_reset;
    logic        error_reset;
    logic        disable_encode;
    logic        enb_errrst_bcrevr;
    logic        test_mode;
    logic        test_invert;
    logic        enb_direct;
    logic        disable_ringosc;
    logic [1:0]  clkout_mode;
    logic [1:0]  pll_multi;
    // CSR1..CSR8
    logic [11:0] mask_window;
    logic [11:0] search_window;
    logic [11:0] match_window;
    logic [11:0] reject_count_offset;
    logic [11:0] event_count_offset;
    logic [11:0] bunch_count_offset;
    logic [11:0] coarse_time_offset;
    logic [11:0] count_roll_over;
    // CSR9
    logic [1:0]  strobe_select;
    logic [1:0]  readout_speed;
    logic [2:0]  width_select;
    logic        csr9_spare;
    logic [3:0]  tdc_id;
    // CSR10
    logic        enb_auto_reject;
    logic        enb_l1occup_readout;
    logic        enb_match;
    logic        enb_mask;
    logic        enb_relative;
    logic        enb_serial;
    logic        enb_header;
    logic        enb_trailer;
    logic        enb_rejected;
    logic        enb_pair;
    logic        enb_trailing;
    logic        enb_leading;
    // CSR11
    logic        enb_rofull_reject;
    logic        enb_l1full_reject;
    logic        enb_trfull_reject;
    logic        enb_errmark;
    logic        enb_mark_rejected;
    logic        enb_errmark_rejected;
    logic        enb_errmark_ovr;
    logic        enb_l1ovr_detect;
    logic        enb_mreset_code;
    logic        enb_resetcb_sepa;
    logic        enb_mreset_evrst;
    logic        enb_setcount_bcrst;
    // CSR12
    logic        enb_sepa_readout;
    logic        enb_sepa_bcrst;
    logic        enb_sepa_evrst;
    logic [NERR-1:0] enb_error;
    // CSR13, CSR14
    logic [NCH-1:0] enb_channel;
  } amt_cfg_t;

  typedef logic [NCTRL-1:0][REG_W-1:0] ctrl_regs_t;
  typedef logic [NSTAT-1:0][REG_W-1:0] stat_regs_t;

  // The struct fields are declared in register order, CSR0 first, so the
  // decoded configuration is the register file read from CSR0 down to CSR14;
  // only the channel enables are reordered.
  function automatic amt_cfg_t decode_cfg(input ctrl_regs_t r);
    logic [NCTRL*REG_W-1:0] flat;
    amt_cfg_t c;
    for (int i = 0; i < NCTRL; i++) flat[(NCTRL-1-i)*REG_W +: REG_W] = r[i];
    c = amt_cfg_t'(flat);
    c.enb_channel = {r[14], r[13]};   // CSR14 holds the upper channels
    return c;
  endfunction

  // Control register contents after a hardware reset (this design's choice):
  // leading and trailing edges, header and trailer, trigger matching with
  // mask flags, all channels and all error flags enabled, counters rolling
  // over at 4095, separate trigger/reset inputs, parallel read-out.
  localparam ctrl_regs_t CTRL_RESET = {
    12'hFFF,                     // CSR14 enb_channel[23:12]
    12'hFFF,                     // CSR13 enb_channel[11:0]
    12'h7FF,                     // CSR12 sepa_bcrst, sepa_evrst, enb_error
    12'h000,                     // CSR11
    12'h333,                     // CSR10 match, mask, header, trailer, leading, trailing
    12'h000,                     // CSR9
    12'hFFF,                     // CSR8 count_roll_over
    12'h000,                     // CSR7 coarse_time_offset
    12'h000,                     // CSR6 bunch_count_offset
    12'h000,                     // CSR5 event_count_offset
    12'h000,                     // CSR4 reject_count_offset
    12'd8,                       // CSR3 match_window
    12'd12,                      // CSR2 search_window
    12'd8,                       // CSR1 mask_window
    12'h000                      // CSR0
  };

endpackage
