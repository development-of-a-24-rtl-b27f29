// trigger_matching: selects the hits in the L1 buffer that belong to each
// trigger and writes them, framed as an event, into the read-out FIFO.
//
// For every trigger taken from the trigger FIFO the L1 buffer is scanned from
// the start pointer towards the write pointer, one word per two cycles (a
// read, then a decision on the returned word). Times are compared in bunch
// units (edge time bits 16:5) as d = hit bunch - trigger time tag, taken
// modulo the counter roll-over into the range -R/2..R/2:
//   d < -mask_window          too old: dropped from the buffer (the start
//                             pointer moves past it while nothing before it
//                             is kept)
//   -mask_window <= d < 0     mask window: sets the channel's mask flag
//   0 <= d <= match_window    match: hit word written to the read-out FIFO
//   d > search_window         the scan stops; this and later hits stay for
//                             later triggers
// Hits between the match and search windows are skipped but kept. The event
// is a header (event id, trigger time tag), the matched hits, a mask-flag
// word if any flag was set, an error word carrying the enabled error flags
// if enb_errmark is set and any flag is up, and a trailer (event id, word
// count including header and trailer); header, mask word, error word and
// trailer each have an enable.
// With enb_relative the edge time is written relative to the trigger time.
// A full read-out FIFO stalls the scan, or with enb_rofull_reject the hit is
// dropped (ro_rejected pulse).
//
// With no trigger waiting and enb_auto_reject set, the word at the start
// pointer is dropped (rejected pulse) if it is older than the reject time
// counter, a counter loaded with reject_count_offset at the bunch count
// reset. With enb_match cleared every L1 word is passed on directly.
// Window semantics, the scan order, the error word, the packing of the
// read-out words
// (ID, tdc id, then channel/time fields) are this design's choices; the
// chip gives the three windows, the reject counter, mask flags, header and
// trailer contents.
`timescale 1ps/1ps
module trigger_matching
  import amt_pkg::*;
#(
  parameter int unsigned L1_DEPTH = 256,
  localparam int unsigned AW = $clog2(L1_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            enb_match,
  input  logic            enb_mask,
  input  logic            enb_header,
  input  logic            enb_trailer,
  input  logic            enb_relative,
  input  logic            enb_auto_reject,
  input  logic            enb_rofull_reject,
  input  logic            enb_errmark,
  input  logic [NERR-1:0] err_flags,     // enabled error flags
  input  logic [BC_W-1:0] match_window,
  input  logic [BC_W-1:0] search_window,
  input  logic [BC_W-1:0] mask_window,
  input  logic [BC_W-1:0] reject_count_offset,
  input  logic [BC_W-1:0] roll_over,
  input  logic [3:0]      tdc_id,
  input  logic            bcr,
  // trigger FIFO
  input  logic            trg_empty,
  input  trig_word_t      trg_head,
  output logic            trg_pop,
  // L1 buffer
  input  logic [AW:0]     l1_wr_ptr,
  output logic [AW:0]     l1_start_ptr,
  output logic            l1_rd_en,
  output logic [AW:0]     l1_rd_addr,
  input  l1_word_t        l1_rdata,
  // read-out FIFO
  input  logic            ro_full,
  output logic            ro_push,
  output logic [31:0]     ro_wdata,
  // events
  output logic            rejected,
  output logic            ro_rejected,
  output logic [BC_W-1:0] reject_cnt,
  output logic            busy          // a trigger is being processed
);

  typedef enum logic [3:0] {
    S_IDLE, S_HDR, S_SCAN, S_EVAL, S_OUT, S_END, S_MASK, S_TRL,
    S_REJ_EVAL, S_DIR_EVAL, S_ERR
  } state_e;

  state_e          state;
  trig_word_t      trg_q;
  logic [AW:0]     ptr, new_start;
  logic            kept;
  logic [NCH-1:0]  masks;
  logic [BC_W-1:0] wcount;
  l1_word_t        hit_q;

  // signed distance a - b modulo R = roll_over + 1, folded into -R/2..R/2
  function automatic logic signed [BC_W+1:0] bdiff(input logic [BC_W-1:0] a,
                                                   input logic [BC_W-1:0] b,
                                                   input logic [BC_W-1:0] roll);
    logic signed [BC_W+1:0] d, r;
    r = $signed({2'b00, roll}) + 1;
    d = $signed({2'b00, a}) - $signed({2'b00, b});
    if (d > (r >>> 1))        d = d - r;
    else if (d < -(r >>> 1))  d = d + r;
    return d;
  endfunction

  function automatic logic [31:0] hit_word(input l1_word_t h, input logic rel,
                                           input logic [BC_W-1:0] ttag,
                                           input logic [3:0] id);
    logic [TIME_W-1:0] t;
    t = rel ? (h.edge_time - {ttag, 5'b0}) : h.edge_time;
    unique case (h.status)
      L1_PAIR:  return {ID_PAIR,  id, h.channel, h.width, t[10:0]};
      L1_TRAIL: return {ID_TRAIL, id, h.channel, 2'b00, t};
      default:  return {ID_LEAD,  id, h.channel, 2'b00, t};
    endcase
  endfunction

  logic signed [BC_W+1:0] d, d_rej;
  logic [BC_W-1:0] hit_bc;
  assign hit_bc = l1_rdata.edge_time[TIME_W-1:TIME_W-BC_W];
  assign d      = bdiff(hit_bc, trg_q.trig_time, roll_over);
  assign d_rej  = bdiff(hit_bc, reject_cnt, roll_over);

  logic signed [BC_W+1:0] lo_lim;
  assign lo_lim = enb_mask ? -$signed({2'b00, mask_window}) : '0;

  // L1 read requests
  always_comb begin
    l1_rd_en   = 1'b0;
    l1_rd_addr = ptr;
    if (state == S_SCAN && ptr != l1_wr_ptr) l1_rd_en = 1'b1;
    if (state == S_IDLE && !(enb_match && !trg_empty) && l1_start_ptr != l1_wr_ptr &&
        (!enb_match || enb_auto_reject)) begin
      l1_rd_en   = 1'b1;
      l1_rd_addr = l1_start_ptr;
    end
  end

  // read-out FIFO writes
  always_comb begin
    ro_push  = 1'b0;
    ro_wdata = '0;
    unique case (state)
      S_HDR: if (enb_header && !ro_full) begin
        ro_push  = 1'b1;
        ro_wdata = {ID_HEADER, tdc_id, trg_q.event_id, trg_q.trig_time};
      end
      S_OUT: if (!ro_full) begin
        ro_push  = 1'b1;
        ro_wdata = hit_word(hit_q, enb_relative, trg_q.trig_time, tdc_id);
      end
      S_DIR_EVAL: if (!ro_full) begin
        ro_push  = 1'b1;
        ro_wdata = hit_word(l1_rdata, 1'b0, '0, tdc_id);
      end
      S_MASK: if (!ro_full) begin
        ro_push  = 1'b1;
        ro_wdata = {ID_MASK, tdc_id, masks};
      end
      S_ERR: if (!ro_full) begin
        ro_push  = 1'b1;
        ro_wdata = {ID_ERROR, tdc_id, {(24-NERR){1'b0}}, err_flags};
      end
      S_TRL: if (enb_trailer && !ro_full) begin
        ro_push  = 1'b1;
        ro_wdata = {ID_TRAILER, tdc_id, trg_q.event_id, wcount + 1'b1};
      end
      default: ;
    endcase
  end

  logic err_mark;
  assign err_mark = enb_errmark && |err_flags;

  assign trg_pop = (state == S_IDLE) && enb_match && !trg_empty;
  assign busy    = (state != S_IDLE) && (state != S_REJ_EVAL) && (state != S_DIR_EVAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      trg_q <= '0;
      ptr <= '0; new_start <= '0; l1_start_ptr <= '0;
      kept <= 1'b0; masks <= '0; wcount <= '0;
      hit_q <= '0;
      rejected <= 1'b0; ro_rejected <= 1'b0;
      reject_cnt <= '0;
    end else begin
      rejected    <= 1'b0;
      ro_rejected <= 1'b0;

      if (bcr)                          reject_cnt <= reject_count_offset;
      else if (reject_cnt == roll_over) reject_cnt <= '0;
      else                              reject_cnt <= reject_cnt + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (trg_pop) begin
            trg_q     <= trg_head;
            ptr       <= l1_start_ptr;
            new_start <= l1_start_ptr;
            kept      <= 1'b0;
            masks     <= '0;
            wcount    <= '0;
            state     <= S_HDR;
          end else if (l1_rd_en) begin
            state <= enb_match ? S_REJ_EVAL : S_DIR_EVAL;
          end
        end
        S_HDR: begin
          if (!enb_header) state <= S_SCAN;
          else if (!ro_full) begin
            wcount <= wcount + 1'b1;
            state  <= S_SCAN;
          end
        end
        S_SCAN: state <= (ptr == l1_wr_ptr) ? S_END : S_EVAL;
        S_EVAL: begin
          hit_q <= l1_rdata;
          if (d < lo_lim) begin
            if (!kept) new_start <= ptr + 1'b1;
            ptr   <= ptr + 1'b1;
            state <= S_SCAN;
          end else if (d > $signed({2'b00, search_window})) begin
            state <= S_END;
          end else begin
            kept <= 1'b1;
            if (d < 0) begin
              masks[l1_rdata.channel] <= 1'b1;
              ptr   <= ptr + 1'b1;
              state <= S_SCAN;
            end else if (d <= $signed({2'b00, match_window})) begin
              state <= S_OUT;
            end else begin
              ptr   <= ptr + 1'b1;
              state <= S_SCAN;
            end
          end
        end
        S_OUT: begin
          if (!ro_full) begin
            wcount <= wcount + 1'b1;
            ptr    <= ptr + 1'b1;
            state  <= S_SCAN;
          end else if (enb_rofull_reject) begin
            ro_rejected <= 1'b1;
            ptr    <= ptr + 1'b1;
            state  <= S_SCAN;
          end
        end
        S_END: begin
          l1_start_ptr <= new_start;
          state <= (enb_mask && |masks) ? S_MASK : (err_mark ? S_ERR : S_TRL);
        end
        S_MASK: if (!ro_full) begin
          wcount <= wcount + 1'b1;
          state  <= err_mark ? S_ERR : S_TRL;
        end
        S_ERR: if (!ro_full) begin
          wcount <= wcount + 1'b1;
          state  <= S_TRL;
        end
        S_TRL: if (!enb_trailer || !ro_full) state <= S_IDLE;
        S_REJ_EVAL: begin
          if (d_rej < 0) begin
            l1_start_ptr <= l1_start_ptr + 1'b1;
            rejected     <= 1'b1;
          end
          state <= S_IDLE;
        end
        S_DIR_EVAL: if (!ro_full) begin
          l1_start_ptr <= l1_start_ptr + 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
