// amt_top: a 24-channel time-to-digital converter with trigger matching, for
// drift-tube detectors read out on a level 1 trigger (the AMT architecture).
//
// Data path: a PLL-locked ring oscillator (pll_ringosc) cuts each 12.5 ns
// period of the 80 MHz clock into 16 bins; two coarse counters count the
// periods. The edges of each hit input latch the tap state and both counters
// into the channel's 4-word buffer. The channel controller moves one hit per
// 40 MHz cycle to the encoder, which turns it into 17-bit edge times
// (0.78125 ns per bit) and writes leading-edge, trailing-edge or pair words
// with the channel number into the 256-word L1 buffer. Triggers, tagged with
// the trigger time counter and the event counter, queue in the 8-word trigger
// FIFO; the trigger matching scans the L1 buffer for hits inside each
// trigger's match window and writes header, hits, mask flags and trailer into
// the 64-word read-out FIFO, which is emptied over the 32-bit parallel port or
// as serial packets. 15 control and 6 status registers (12 bits) are reached
// from a 12-bit bus or JTAG; JTAG also starts the memory self test of the L1
// buffer and both FIFOs.
//
// Clocks: clk is the 40 MHz beam clock. The chip's logic runs on the PLL's
// 40 MHz system clock and 80 MHz clock, both edge-aligned to clk; the hit
// inputs clock their channel buffers. Resets: rst_n is the hardware reset
// (also of the registers); CSR0 global_reset and the master reset code reset
// everything but the registers. Error flags (CSR16[8:0]) are sticky until
// CSR0 error_reset; error is their OR masked by CSR12 enb_error. With CSR11
// enb_errmark the masked flags are also written into every event as an
// error word.
// The LVDS receivers and drivers of the chip are plain ports here. The JTAG
// SAMPLE register observes the 64 data pins (hit inputs first, nearest
// TDO) and the DEBUG register the L1 pointers, FIFO occupancies, reject
// counter and matching busy flag; no boundary cell drives a pin. Control
// bits whose
// behaviour is not defined by this design (the test, clock-out and PLL
// settings of CSR0, the other error-mark bits and the special reset
// enables of CSR10..12)
// are stored and readable but drive nothing.
`timescale 1ps/1ps
module amt_top
  import amt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCH-1:0]    hit,
  input  logic              trigger,
  input  logic              bunch_reset,
  input  logic              event_reset,
  input  logic [4:0]        csr_addr,
  input  logic              csr_wr,
  input  logic [REG_W-1:0]  csr_wdata,
  output logic [REG_W-1:0]  csr_rdata,
  output logic [31:0]       dout,
  output logic              dready,
  input  logic              get_data,
  output logic              serial_data,
  output logic              serial_strobe,
  output logic              error,
  output logic              pll_locked,
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  input  logic              trst_n,
  output logic              tdo,
  output logic              tdo_en
);

  localparam int unsigned L1_AW = 8;

  // ---- configuration ------------------------------------------------------
  ctrl_regs_t ctrl, jtag_ctrl;
  stat_regs_t stat;
  amt_cfg_t   cfg;
  logic       jtag_load, control_parity;

  // ---- clocks and reset ---------------------------------------------------
  logic            clk80, sclk;
  logic [NTAP-1:0] taps;
  logic            core_rst_n;
  logic            mreset;

  pll_ringosc u_pll (
    .clk_ref(clk), .rst_n(rst_n), .disable_osc(cfg.disable_ringosc),
    .clk80(clk80), .clk40(sclk), .taps(taps), .locked(pll_locked)
  );

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) core_rst_n <= 1'b0;
    else        core_rst_n <= !cfg.global_reset && !mreset;
  end

  // ---- coarse counters ----------------------------------------------------
  logic [COARSE_W-1:0] cnt_a, cnt_b;
  logic                par_a, par_b, coarse_perr;
  logic                bcr, evr;

  coarse_counter u_coarse (
    .clk80(clk80), .rst_n(core_rst_n), .load(bcr),
    .offset(cfg.coarse_time_offset), .roll_over(cfg.count_roll_over),
    .cnt_a(cnt_a), .par_a(par_a), .cnt_b(cnt_b), .par_b(par_b),
    .parity_error(coarse_perr)
  );

  // ---- channel buffers ----------------------------------------------------
  logic [NCH-1:0] ch_valid, ch_rd, ch_ovr;
  hit_raw_t       ch_word [NCH];

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    channel_buffer u_chbuf (
      .hit(hit[i]), .enable(cfg.enb_channel[i]), .taps(taps),
      .cnt_a(cnt_a), .par_a(par_a), .cnt_b(cnt_b), .par_b(par_b),
      .clk(sclk), .rst_n(core_rst_n), .rd(ch_rd[i]), .valid(ch_valid[i]),
      .word(ch_word[i]), .overflow(ch_ovr[i])
    );
  end

  // ---- channel controller and encoder -------------------------------------
  logic            gnt_valid, enc_ready, l1_we, enc_perr;
  logic [CH_W-1:0] gnt_idx;
  l1_word_t        l1_wdata;

  channel_controller #(.N(NCH)) u_chctl (
    .clk(sclk), .rst_n(core_rst_n), .req(ch_valid), .ready(enc_ready),
    .gnt_valid(gnt_valid), .gnt_idx(gnt_idx), .rd(ch_rd)
  );

  encoder_formatter u_enc (
    .clk(sclk), .rst_n(core_rst_n), .in_valid(gnt_valid), .in_ch(gnt_idx),
    .in_word(ch_word[gnt_idx]), .enb_leading(cfg.enb_leading),
    .enb_trailing(cfg.enb_trailing), .enb_pair(cfg.enb_pair),
    .disable_encode(cfg.disable_encode), .width_select(cfg.width_select),
    .roll_over(cfg.count_roll_over), .ready(enc_ready), .l1_we(l1_we),
    .l1_word(l1_wdata), .parity_error(enc_perr)
  );

  // ---- L1 buffer ----------------------------------------------------------
  logic [L1_AW:0] l1_start, l1_wp, l1_rd_addr, l1_occ;
  logic           l1_rd_en, l1_perr, l1_empty, l1_full, l1_nfull, l1_ovr, l1_recover;
  l1_word_t       l1_rdata;
  logic           l1_bist_en, l1_bist_we;
  logic [L1_AW-1:0] l1_bist_addr;
  logic [$bits(l1_word_t):0] l1_bist_wdata, l1_bist_rdata;

  l1_buffer u_l1 (
    .clk(sclk), .rst_n(core_rst_n), .we(l1_we), .wdata(l1_wdata),
    .start_ptr(l1_start), .rd_en(l1_rd_en), .rd_addr(l1_rd_addr),
    .rdata(l1_rdata), .rd_parity_error(l1_perr), .wr_ptr(l1_wp),
    .occupancy(l1_occ), .empty(l1_empty), .full(l1_full),
    .nearly_full(l1_nfull), .overflow(l1_ovr), .over_recover(l1_recover),
    .err_clear(cfg.error_reset), .bist_en(l1_bist_en), .bist_we(l1_bist_we),
    .bist_addr(l1_bist_addr), .bist_wdata(l1_bist_wdata),
    .bist_rdata(l1_bist_rdata)
  );

  // ---- trigger interface and trigger FIFO ---------------------------------
  logic            trig_valid;
  logic [BC_W-1:0] trig_event_id, trig_time, trig_time_cnt, event_cnt;
  logic            trg_pop, trg_empty, trg_full, trg_nfull, trg_ovr, trg_perr;
  logic [3:0]      trg_occ;
  trig_word_t      trg_head;
  logic            trg_bist_en, trg_bist_we;
  logic [2:0]      trg_bist_addr;
  logic [$bits(trig_word_t):0] trg_bist_wdata, trg_bist_rdata;

  trigger_interface u_trgif (
    .clk(sclk), .rst_n(core_rst_n), .trigger(trigger),
    .bunch_reset(bunch_reset), .event_reset(event_reset),
    .enb_sepa_bcrst(cfg.enb_sepa_bcrst), .enb_sepa_evrst(cfg.enb_sepa_evrst),
    .enb_mreset_code(cfg.enb_mreset_code),
    .bunch_count_offset(cfg.bunch_count_offset),
    .event_count_offset(cfg.event_count_offset),
    .roll_over(cfg.count_roll_over), .trig_valid(trig_valid),
    .trig_event_id(trig_event_id), .trig_time(trig_time), .bcr(bcr),
    .evr(evr), .mreset(mreset), .trig_time_cnt(trig_time_cnt),
    .event_cnt(event_cnt)
  );

  trigger_fifo u_trgfifo (
    .clk(sclk), .rst_n(core_rst_n), .push(trig_valid),
    .push_event_id(trig_event_id), .push_trig_time(trig_time), .pop(trg_pop),
    .head(trg_head), .parity_error(trg_perr), .empty(trg_empty),
    .full(trg_full), .nearly_full(trg_nfull), .occupancy(trg_occ),
    .overflow(trg_ovr), .err_clear(cfg.error_reset),
    .bist_en(trg_bist_en), .bist_we(trg_bist_we), .bist_addr(trg_bist_addr),
    .bist_wdata(trg_bist_wdata), .bist_rdata(trg_bist_rdata)
  );

  // ---- trigger matching ---------------------------------------------------
  logic            ro_full, ro_empty, ro_push, ro_pop, ro_perr;
  logic [31:0]     ro_wdata, ro_head;
  logic [6:0]      ro_occ;
  logic            rejected, ro_rejected, tm_busy;
  logic [BC_W-1:0] reject_cnt;

  logic [NERR-1:0] err_flags, err_set;

  trigger_matching u_match (
    .clk(sclk), .rst_n(core_rst_n),
    .enb_match(cfg.enb_match), .enb_mask(cfg.enb_mask),
    .enb_header(cfg.enb_header), .enb_trailer(cfg.enb_trailer),
    .enb_relative(cfg.enb_relative), .enb_auto_reject(cfg.enb_auto_reject),
    .enb_rofull_reject(cfg.enb_rofull_reject),
    .enb_errmark(cfg.enb_errmark), .err_flags(err_flags & cfg.enb_error),
    .match_window(cfg.match_window), .search_window(cfg.search_window),
    .mask_window(cfg.mask_window), .reject_count_offset(cfg.reject_count_offset),
    .roll_over(cfg.count_roll_over), .tdc_id(cfg.tdc_id), .bcr(bcr),
    .trg_empty(trg_empty), .trg_head(trg_head), .trg_pop(trg_pop),
    .l1_wr_ptr(l1_wp), .l1_start_ptr(l1_start), .l1_rd_en(l1_rd_en),
    .l1_rd_addr(l1_rd_addr), .l1_rdata(l1_rdata),
    .ro_full(ro_full), .ro_push(ro_push), .ro_wdata(ro_wdata),
    .rejected(rejected), .ro_rejected(ro_rejected), .reject_cnt(reject_cnt),
    .busy(tm_busy)
  );

  // ---- read-out FIFO and interface ----------------------------------------
  logic        ro_bist_en, ro_bist_we;
  logic [5:0]  ro_bist_addr;
  logic [32:0] ro_bist_wdata, ro_bist_rdata;
  logic        s_busy;

  readout_fifo u_rofifo (
    .clk(sclk), .rst_n(core_rst_n), .push(ro_push), .wdata(ro_wdata),
    .pop(ro_pop), .head(ro_head), .parity_error(ro_perr), .empty(ro_empty),
    .full(ro_full), .occupancy(ro_occ), .bist_en(ro_bist_en),
    .bist_we(ro_bist_we), .bist_addr(ro_bist_addr),
    .bist_wdata(ro_bist_wdata), .bist_rdata(ro_bist_rdata)
  );

  readout_interface u_rdout (
    .clk(sclk), .clk80(clk80), .rst_n(core_rst_n),
    .enb_serial(cfg.enb_serial), .readout_speed(cfg.readout_speed),
    .strobe_select(cfg.strobe_select), .fifo_empty(ro_empty),
    .fifo_head(ro_head), .fifo_pop(ro_pop), .dout(dout), .dready(dready),
    .get_data(get_data), .sdata(serial_data), .sstrobe(serial_strobe),
    .s_busy(s_busy)
  );

  // ---- error flags --------------------------------------------------------

  always_comb begin
    err_set = '0;
    err_set[ERR_COARSE_PAR] = coarse_perr | enc_perr;
    err_set[ERR_CHBUF_OVR]  = |ch_ovr;
    err_set[ERR_L1_PAR]     = l1_perr;
    err_set[ERR_TRG_PAR]    = trg_perr;
    err_set[ERR_RO_PAR]     = ro_perr;
    err_set[ERR_L1_OVR]     = l1_ovr;
    err_set[ERR_TRG_OVR]    = trg_ovr;
    err_set[ERR_RO_OVR]     = ro_rejected;
    err_set[ERR_CTRL_PAR]   = control_parity;
  end

  always_ff @(posedge sclk or negedge core_rst_n) begin
    if (!core_rst_n)          err_flags <= '0;
    else if (cfg.error_reset) err_flags <= '0;
    else                      err_flags <= err_flags | err_set;
  end

  assign error = |(err_flags & cfg.enb_error);

  // ---- control and status registers ---------------------------------------
  logic [L1_AW-1:0] l1_rd_addr_q;
  always_ff @(posedge sclk or negedge core_rst_n) begin
    if (!core_rst_n)   l1_rd_addr_q <= '0;
    else if (l1_rd_en) l1_rd_addr_q <= l1_rd_addr[L1_AW-1:0];
  end

  always_comb begin
    stat[0] = {ro_empty, ro_full, control_parity, err_flags};
    stat[1] = {l1_empty, l1_nfull, l1_recover, l1_ovr, l1_wp[L1_AW-1:0]};
    stat[2] = {trg_empty, trg_nfull, trg_full, tm_busy, l1_rd_addr_q};
    stat[3] = {cnt_a[0], trg_occ[2:0], l1_start[L1_AW-1:0]};
    stat[4] = cnt_a[COARSE_W-1:1];
    stat[5] = {6'b0, ro_occ[5:0]};
  end

  csr u_csr (
    .clk(sclk), .rst_n(rst_n), .addr(csr_addr), .wr(csr_wr),
    .wdata(csr_wdata), .rdata(csr_rdata), .jtag_load(jtag_load),
    .jtag_ctrl(jtag_ctrl), .stat(stat), .ctrl(ctrl), .cfg(cfg),
    .control_parity(control_parity)
  );

  // ---- JTAG and memory self test ------------------------------------------
  logic       bist_start;
  logic [2:0] bist_done, bist_fail;

  jtag_tap u_jtag (
    .tck(tck), .tms(tms), .tdi(tdi), .trst_n(trst_n), .tdo(tdo),
    .tdo_en(tdo_en), .clk(sclk), .rst_n(rst_n), .ctrl_now(ctrl),
    .stat_now(stat), .bist_done(bist_done), .bist_fail(bist_fail),
    .ctrl_data(jtag_ctrl), .ctrl_load(jtag_load), .bist_start(bist_start),
    .pins({error, serial_strobe, serial_data, dready, dout, get_data,
           event_reset, bunch_reset, trigger, hit}),
    .debug({tm_busy, reject_cnt, trg_occ, ro_occ, l1_start, l1_wp})
  );

  mbist #(.DEPTH(256), .DW($bits(l1_word_t) + 1)) u_bist_l1 (
    .clk(sclk), .rst_n(core_rst_n), .start(bist_start),
    .bist_en(l1_bist_en), .bist_we(l1_bist_we), .bist_addr(l1_bist_addr),
    .bist_wdata(l1_bist_wdata), .bist_rdata(l1_bist_rdata),
    .done(bist_done[0]), .fail(bist_fail[0])
  );

  mbist #(.DEPTH(8), .DW($bits(trig_word_t) + 1)) u_bist_trg (
    .clk(sclk), .rst_n(core_rst_n), .start(bist_start),
    .bist_en(trg_bist_en), .bist_we(trg_bist_we), .bist_addr(trg_bist_addr),
    .bist_wdata(trg_bist_wdata), .bist_rdata(trg_bist_rdata),
    .done(bist_done[1]), .fail(bist_fail[1])
  );

  mbist #(.DEPTH(64), .DW(33)) u_bist_ro (
    .clk(sclk), .rst_n(core_rst_n), .start(bist_start),
    .bist_en(ro_bist_en), .bist_we(ro_bist_we), .bist_addr(ro_bist_addr),
    .bist_wdata(ro_bist_wdata), .bist_rdata(ro_bist_rdata),
    .done(bist_done[2]), .fail(bist_fail[2])
  );

endmodule
