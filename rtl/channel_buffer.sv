// channel_buffer: the 4-word buffer of one hit channel.
//
// The hit signal itself clocks the time measurement: its rising edge latches
// the ring-oscillator taps and both coarse counters (leading edge) into the
// word at the write pointer, its falling edge latches the same for the
// trailing edge and advances the write pointer. A word therefore holds one
// complete hit, leading and trailing edge, as in the chip's channel buffer.
// Words wait here until the channel controller moves them, on the 40 MHz
// system clock, towards the L1 buffer; the buffer is a small asynchronous
// FIFO between the hit edges and the system clock.
//
// The write pointer is kept in Gray code and synchronised into the clk
// domain with two flip-flops. The hit side reads the Gray read pointer
// directly when it decides whether the buffer is full: a pointer that is
// just changing can at worst make it look full one hit too early. A hit that
// finds the buffer full is lost and toggles ovr_tog, which the clk side turns
// into a one-cycle overflow pulse. Disabled channels (enable low) ignore
// their input. The synchronisers, the Gray pointers and the handling of a
// full buffer are this design's choices; the depth (4 words) is the chip's.
`timescale 1ps/1ps
module channel_buffer
  import amt_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                hit,
  input  logic                enable,
  input  logic [NTAP-1:0]     taps,
  input  logic [COARSE_W-1:0] cnt_a,
  input  logic                par_a,
  input  logic [COARSE_W-1:0] cnt_b,
  input  logic                par_b,
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rd,        // pop the word at the head
  output logic                valid,     // a complete hit is waiting
  output hit_raw_t            word,
  output logic                overflow   // one clk cycle per lost hit
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic        hit_g;
  edge_raw_t   now;
  edge_raw_t   lead_mem  [DEPTH];
  edge_raw_t   trail_mem [DEPTH];
  logic [AW:0] wp_bin, rp_bin;
  logic [AW:0] wp_gray, rp_gray;
  logic [AW:0] wp_s1, wp_s2;
  logic        accept;
  logic        ovr_tog, ovr_s1, ovr_s2, ovr_s3;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign hit_g = hit & enable;
  assign now   = '{taps: taps, cnt_a: cnt_a, par_a: par_a, cnt_b: cnt_b, par_b: par_b};

  // ---- hit domain ---------------------------------------------------------
  logic full_h;
  assign full_h = (wp_gray == {~rp_gray[AW:AW-1], rp_gray[AW-2:0]});

  always_ff @(posedge hit_g or negedge rst_n) begin
    if (!rst_n) begin
      accept  <= 1'b0;
      ovr_tog <= 1'b0;
    end else begin
      accept <= !full_h;
      if (!full_h) lead_mem[wp_bin[AW-1:0]] <= now;
      else         ovr_tog <= ~ovr_tog;
    end
  end

  always_ff @(negedge hit_g or negedge rst_n) begin
    if (!rst_n) begin
      wp_bin  <= '0;
      wp_gray <= '0;
    end else if (accept) begin
      trail_mem[wp_bin[AW-1:0]] <= now;
      wp_bin  <= wp_bin + 1'b1;
      wp_gray <= bin2gray(wp_bin + 1'b1);
    end
  end

  // ---- system clock domain -----------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_s1 <= '0; wp_s2 <= '0;
      ovr_s1 <= 1'b0; ovr_s2 <= 1'b0; ovr_s3 <= 1'b0;
      rp_bin <= '0; rp_gray <= '0;
    end else begin
      wp_s1 <= wp_gray;
      wp_s2 <= wp_s1;
      ovr_s1 <= ovr_tog;
      ovr_s2 <= ovr_s1;
      ovr_s3 <= ovr_s2;
      if (rd && valid) begin
        rp_bin  <= rp_bin + 1'b1;
        rp_gray <= bin2gray(rp_bin + 1'b1);
      end
    end
  end

  assign valid    = (rp_gray != wp_s2);
  assign word     = '{lead: lead_mem[rp_bin[AW-1:0]], trail: trail_mem[rp_bin[AW-1:0]]};
  assign overflow = ovr_s2 ^ ovr_s3;

endmodule
