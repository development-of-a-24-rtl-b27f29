// readout_interface: sends the read-out FIFO's 32-bit words off chip, either
// on a parallel port or as serial packets.
//
// Parallel (enb_serial low): dout shows the FIFO head and dready is high
// while the FIFO holds a word; the receiver takes it by raising get_data for
// one clk cycle per word.
//
// Serial (enb_serial high): each word becomes a 35-bit packet: a start bit
// (1), the 32 data bits MSB first, an even parity bit (XOR of the data) and
// a stop bit (0); the line rests at 0 between packets. The converter runs on
// the 80 MHz clock; a bit lasts 2**readout_speed periods of it, i.e.
// readout_speed 0,1,2,3 give 80, 40, 20, 10 Mbit/s. strobe_select[0] = 0
// selects the DS (data-strobe) protocol: the strobe line toggles at each
// bit boundary where the data line does not, so exactly one of the two lines
// changes per bit. strobe_select[0] = 1 gives the simple data-clock form:
// the strobe toggles at every bit boundary.
//
// A word passes from the clk domain to the clk80 domain through a one-word
// holding register and a pair of toggle flags (ld_tog set by clk, cap_tog
// answered by clk80); both clocks come from the same oscillator with
// coincident edges, so the flags are read directly. The packet layout and
// the rates are the chip's; speed and strobe codes, the handshake and the
// parallel protocol are this design's choices.
`timescale 1ps/1ps
module readout_interface (
  input  logic        clk,
  input  logic        clk80,
  input  logic        rst_n,
  input  logic        enb_serial,
  input  logic [1:0]  readout_speed,
  input  logic [1:0]  strobe_select,
  input  logic        fifo_empty,
  input  logic [31:0] fifo_head,
  output logic        fifo_pop,
  output logic [31:0] dout,
  output logic        dready,
  input  logic        get_data,
  output logic        sdata,
  output logic        sstrobe,
  output logic        s_busy
);

  localparam int unsigned PKT = 35;

  // ---- parallel port and serial hand-over (clk domain) ------------------
  logic [31:0] sbuf;
  logic        ld_tog, cap_tog;
  logic        load;

  assign dout   = fifo_head;
  assign dready = !enb_serial && !fifo_empty;
  assign load   = enb_serial && !fifo_empty && (ld_tog == cap_tog);
  assign fifo_pop = (dready && get_data) || load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sbuf   <= '0;
      ld_tog <= 1'b0;
    end else if (load) begin
      sbuf   <= fifo_head;
      ld_tog <= ~ld_tog;
    end
  end

  // ---- serialiser (clk80 domain) ----------------------------------------
  logic [PKT-1:0] shreg;
  logic [5:0]     bits_left;
  logic [3:0]     div;
  logic [3:0]     period;

  assign period = 4'd1 << readout_speed;
  assign s_busy = (bits_left != 0) || (ld_tog != cap_tog);

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      cap_tog   <= 1'b0;
      shreg     <= '0;
      bits_left <= '0;
      div       <= '0;
      sdata     <= 1'b0;
      sstrobe   <= 1'b0;
    end else begin
      if (div != 0) begin
        div <= div - 1'b1;
      end else if (bits_left != 0 || ld_tog != cap_tog) begin
        logic [PKT-1:0] sh;
        logic           b;
        sh = shreg;
        if (bits_left == 0) begin
          sh      = {1'b1, sbuf, ^sbuf, 1'b0};
          cap_tog <= ld_tog;
          bits_left <= 6'(PKT - 1);
        end else begin
          bits_left <= bits_left - 1'b1;
        end
        b     = sh[PKT-1];
        shreg <= sh << 1;
        sdata <= b;
        if (strobe_select[0] || b == sdata) sstrobe <= ~sstrobe;
        div   <= period - 1'b1;
      end else begin
        sdata <= 1'b0;
      end
    end
  end

endmodule
