// trigger_interface: receives the trigger and the bunch/event count resets,
// and keeps the event counter and the trigger time counter.
//
// The trigger time counter counts 40 MHz cycles and rolls over after
// roll_over; a bunch count reset loads it with bunch_count_offset (one cycle
// after the reset is sampled, the same moment the coarse counter is loaded
// with its own offset). The difference of the two offsets is therefore the
// trigger latency: a trigger's time tag equals the bunch number of the hits
// it belongs to. The event counter is loaded with event_count_offset by an
// event count reset and counts triggers; a trigger's event id is the count
// before it.
//
// With enb_sepa_bcrst and enb_sepa_evrst set, trigger, bunch_reset and
// event_reset are separate inputs, sampled each clk (one trigger per cycle
// high). Otherwise the trigger input carries 3-bit codes, a '1' followed by
// two bits: 00 trigger, 10 bunch count reset, 01 event count reset,
// 11 master reset (honoured only with enb_mreset_code). The time tag of an
// encoded trigger is the counter value when its first bit was sampled.
// Outputs are one-cycle pulses. The code values and the sampling are this
// design's choices; the counters and offsets are the chip's.
`timescale 1ps/1ps
module trigger_interface
  import amt_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            trigger,
  input  logic            bunch_reset,
  input  logic            event_reset,
  input  logic            enb_sepa_bcrst,
  input  logic            enb_sepa_evrst,
  input  logic            enb_mreset_code,
  input  logic [BC_W-1:0] bunch_count_offset,
  input  logic [BC_W-1:0] event_count_offset,
  input  logic [BC_W-1:0] roll_over,
  output logic            trig_valid,
  output logic [BC_W-1:0] trig_event_id,
  output logic [BC_W-1:0] trig_time,
  output logic            bcr,
  output logic            evr,
  output logic            mreset,
  output logic [BC_W-1:0] trig_time_cnt,
  output logic [BC_W-1:0] event_cnt
);

  logic       encoded;
  logic [1:0] shift_cnt;       // bits of a code still to come
  logic [1:0] code;
  logic [BC_W-1:0] tag_q;

  assign encoded = !(enb_sepa_bcrst && enb_sepa_evrst);

  // event id of the trigger being issued: the count before it
  assign trig_event_id = event_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_cnt <= '0; code <= '0; tag_q <= '0;
      trig_valid <= 1'b0; trig_time <= '0;
      bcr <= 1'b0; evr <= 1'b0; mreset <= 1'b0;
      trig_time_cnt <= '0; event_cnt <= '0;
    end else begin
      trig_valid <= 1'b0;
      bcr        <= 1'b0;
      evr        <= 1'b0;
      mreset     <= 1'b0;

      // trigger time counter
      if (bcr)                             trig_time_cnt <= bunch_count_offset;
      else if (trig_time_cnt == roll_over) trig_time_cnt <= '0;
      else                                 trig_time_cnt <= trig_time_cnt + 1'b1;

      // event counter
      if (evr)             event_cnt <= event_count_offset;
      else if (trig_valid) event_cnt <= event_cnt + 1'b1;

      if (enb_sepa_bcrst) bcr <= bunch_reset;
      if (enb_sepa_evrst) evr <= event_reset;

      if (!encoded) begin
        shift_cnt <= '0;
        if (trigger) begin
          trig_valid    <= 1'b1;
          trig_time     <= trig_time_cnt;
        end
      end else if (shift_cnt == 0) begin
        if (trigger) begin
          shift_cnt <= 2'd2;
          tag_q     <= trig_time_cnt;
        end
      end else begin
        shift_cnt <= shift_cnt - 1'b1;
        code      <= {code[0], trigger};
        if (shift_cnt == 2'd1) begin
          unique case ({code[0], trigger})
            2'b00: begin trig_valid <= 1'b1; trig_time <= tag_q; end
            2'b10: if (!enb_sepa_bcrst) bcr <= 1'b1;
            2'b01: if (!enb_sepa_evrst) evr <= 1'b1;
            2'b11: mreset <= enb_mreset_code;
          endcase
        end
      end
    end
  end

endmodule
