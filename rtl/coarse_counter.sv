// coarse_counter: the pair of 13-bit coarse time counters, each with a parity
// bit, that count 80 MHz periods.
//
// A hit latches the ring-oscillator taps together with the coarse count. A
// counter caught in the middle of its transition would give a wrong count, so
// the chip keeps two counters on opposite clock phases and later picks the one
// that was stable. Counter A increments on the rising edge of clk80 (start of
// fine bin 0); counter B copies A on the falling edge (start of bin 8), so B
// equals A during bins 8..15 and A-1 during bins 0..7. Which counter the
// encoder uses, and the phase relation, is this design's reading of the
// "Coarse Counter x2" in the block diagram.
//
// Interface: load (from the bunch-count reset, sampled on clk80) sets
// A = {offset, 0}; the count rolls over to zero after {roll_over, 1}, so the
// upper 12 bits follow a bunch counter that rolls over at roll_over. The
// parity bit of each counter is computed from the next value and stored with
// it (even parity: ^{cnt, par} == 0); parity_error flags a mismatch (an upset
// in either counter).
`timescale 1ps/1ps
module coarse_counter #(
  parameter int unsigned W = 13
) (
  input  logic         clk80,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-2:0] offset,
  input  logic [W-2:0] roll_over,
  output logic [W-1:0] cnt_a,
  output logic         par_a,
  output logic [W-1:0] cnt_b,
  output logic         par_b,
  output logic         parity_error
);

  logic [W-1:0] next_a;

  always_comb begin
    if (load)                          next_a = {offset, 1'b0};
    else if (cnt_a == {roll_over, 1'b1}) next_a = '0;
    else                               next_a = cnt_a + 1'b1;
  end

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      cnt_a <= '0;
      par_a <= 1'b0;
    end else begin
      cnt_a <= next_a;
      par_a <= ^next_a;
    end
  end

  always_ff @(negedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      cnt_b <= '0;
      par_b <= 1'b0;
    end else begin
      cnt_b <= cnt_a;
      par_b <= par_a;
    end
  end

  assign parity_error = (^{cnt_a, par_a}) | (^{cnt_b, par_b});

endmodule
