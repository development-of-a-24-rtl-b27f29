// encoder_formatter: turns a raw hit from a channel buffer into L1 buffer
// words.
//
// Fine time: the taps carry a block of eight ones that moves one position per
// 0.78 ns bin; the bin number j is the position whose tap is high while the
// next tap (j+1 mod 16) is still low. Coarse time: counter A changes at the
// start of bin 0 and counter B half a period later, so A is read for bins
// 4..11, B for bins 12..15 (where B equals A) and B+1 for bins 0..3 (where B
// still lags A by one). The edge time is {coarse, fine}, 17 bits in units of
// 0.78125 ns. The parity of the counter used is checked (parity_error pulse).
//
// Depending on the enables, a hit gives a leading-edge word, a trailing-edge
// word, both (two cycles), or one pair word holding the leading time and the
// pulse width (trailing - leading) >> width_select, saturated to 8 bits. The
// word carries the channel number. With disable_encode the fine field holds
// the tap index as found without the coarse correction (test use).
// ready is high when the encoder can take a new hit this cycle; one L1 word
// leaves per cycle (l1_we), one cycle after the hit was taken.
// The tap code, the counter selection and the width scaling are this
// design's choices; the chip gives the fields (status, channel, pulse width,
// 17-bit edge time) and the sequence select-encode-write.
`timescale 1ps/1ps
module encoder_formatter
  import amt_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [CH_W-1:0] in_ch,
  input  hit_raw_t        in_word,
  input  logic            enb_leading,
  input  logic            enb_trailing,
  input  logic            enb_pair,
  input  logic            disable_encode,
  input  logic [2:0]      width_select,
  input  logic [BC_W-1:0] roll_over,
  output logic            ready,
  output logic            l1_we,
  output l1_word_t        l1_word,
  output logic            parity_error
);

  function automatic logic [3:0] fine_of(input logic [NTAP-1:0] t);
    logic [3:0] f;
    f = '0;
    for (int i = NTAP-1; i >= 0; i--)
      if (t[i] && !t[(i+1) % NTAP]) f = 4'(i);
    return f;
  endfunction

  function automatic logic [TIME_W-1:0] time_of(input edge_raw_t e, input logic raw,
                                                input logic [BC_W-1:0] roll);
    logic [3:0]          f;
    logic [COARSE_W-1:0] c;
    f = fine_of(e.taps);
    if (raw || (f >= 4 && f <= 11)) c = e.cnt_a;
    else if (f >= 12)               c = e.cnt_b;
    else if (e.cnt_b == {roll, 1'b1}) c = '0;
    else                            c = e.cnt_b + 1'b1;
    return {c, f};
  endfunction

  function automatic logic par_bad(input edge_raw_t e);
    logic [3:0] f;
    f = fine_of(e.taps);
    if (f >= 4 && f <= 11) return ^{e.cnt_a, e.par_a};
    else                   return ^{e.cnt_b, e.par_b};
  endfunction

  logic [TIME_W-1:0] lead_t, trail_t;
  logic [CH_W-1:0]   ch_q;
  logic [WIDTH_W-1:0] width_q;
  logic              pend_lead, pend_trail, pend_pair;
  logic              take;
  logic [TIME_W-1:0] lt, tt, dt, dts;

  always_comb begin
    lt  = time_of(in_word.lead,  disable_encode, roll_over);
    tt  = time_of(in_word.trail, disable_encode, roll_over);
    dt  = tt - lt;
    dts = dt >> width_select;
  end

  // at most one word still pending after this cycle's emission
  assign ready = (32'(pend_lead) + 32'(pend_trail) + 32'(pend_pair)) <= 1;
  assign take  = in_valid && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_lead <= 1'b0; pend_trail <= 1'b0; pend_pair <= 1'b0;
      lead_t <= '0; trail_t <= '0; ch_q <= '0; width_q <= '0;
      parity_error <= 1'b0;
    end else begin
      parity_error <= 1'b0;
      // emission order: pair, leading, trailing
      if (pend_pair)       pend_pair  <= 1'b0;
      else if (pend_lead)  pend_lead  <= 1'b0;
      else if (pend_trail) pend_trail <= 1'b0;
      if (take) begin
        lead_t  <= lt;
        trail_t <= tt;
        ch_q    <= in_ch;
        width_q <= (|dts[TIME_W-1:WIDTH_W]) ? '1 : dts[WIDTH_W-1:0];
        pend_pair  <= enb_pair;
        pend_lead  <= !enb_pair && enb_leading;
        pend_trail <= !enb_pair && enb_trailing;
        parity_error <= par_bad(in_word.lead) | par_bad(in_word.trail);
      end
    end
  end

  always_comb begin
    l1_we   = pend_pair | pend_lead | pend_trail;
    l1_word = '{status: L1_NONE, channel: ch_q, width: '0, edge_time: lead_t};
    if (pend_pair) begin
      l1_word.status = L1_PAIR;
      l1_word.width  = width_q;
    end else if (pend_lead) begin
      l1_word.status = L1_LEAD;
    end else if (pend_trail) begin
      l1_word.status    = L1_TRAIL;
      l1_word.edge_time = trail_t;
    end
  end

endmodule
