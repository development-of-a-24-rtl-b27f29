// pll_ringosc: behavioural model (not synthesizable) of the PLL and the
// asymmetric ring oscillator that give the TDC its timing.
//
// In the chip a 16-stage asymmetric ring oscillator, locked by a PLL to twice
// the 40 MHz beam clock, supplies 16 equally spaced timing signals; one 12.5 ns
// period is thus cut into 16 bins of 0.78125 ns. The oscillator is an analog,
// hand-placed macro, so here it is modelled with delays: on every rising edge
// of the reference clock the model plays out two 80 MHz periods (32 bins),
// re-anchored to the reference each time so rounding to 1 ps never builds up.
//
// Tap encoding (this model's convention; the chip's own node order is not
// used): in bin j (0..15) of an 80 MHz period, taps[i] is high when
// (j - i) mod 16 < 8, so the taps carry a block of eight ones that rotates by
// one position per bin. clk80 equals taps[0] (rising at bin 0) and rises
// together with the reference. clk40, the 40 MHz system clock, is the
// reference itself: in the locked chip the two are in phase, and passing it
// straight through keeps the system clock visible to synthesis, which sees
// the delay-based oscillator below as constant. locked rises LOCK_CYCLES
// reference cycles after reset; the oscillator itself runs through reset.
// disable_osc stops the oscillator (taps and clk80 hold).
`timescale 1ps/1ps
module pll_ringosc #(
  parameter int unsigned NTAP          = 16,
  parameter int unsigned REF_PERIOD_PS = 25000,
  parameter int unsigned LOCK_CYCLES   = 4
) (
  input  logic            clk_ref,       // 40 MHz beam clock
  input  logic            rst_n,
  input  logic            disable_osc,
  output logic            clk80,
  output logic            clk40,
  output logic [NTAP-1:0] taps,
  output logic            locked
);

  int unsigned lock_cnt;

  // the 40 MHz system clock is the reference itself, phase locked
  assign clk40 = clk_ref;

  function automatic logic [NTAP-1:0] tap_pattern(input int unsigned j);
    logic [NTAP-1:0] t;
    for (int unsigned i = 0; i < NTAP; i++) t[i] = (((j + NTAP - i) % NTAP) < NTAP/2);
    return t;
  endfunction

  initial begin
    taps   = tap_pattern(NTAP/2);
    clk80  = 1'b0;
    locked = 1'b0;
    lock_cnt = 0;
  end

  always @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      locked   = 1'b0;
      lock_cnt = 0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt++;
    end else begin
      locked = 1'b1;
    end
  end

  // the oscillator runs during reset too, so that synchronous logic sees
  // clock edges while its reset is held
  always @(posedge clk_ref) begin
    if (!disable_osc) begin
      // bin k of 2*NTAP starts at floor(k * REF_PERIOD_PS / (2*NTAP))
      for (int unsigned k = 0; k < 2*NTAP; k++) begin
        if (k > 0)
          #((k * REF_PERIOD_PS) / (2*NTAP) - ((k-1) * REF_PERIOD_PS) / (2*NTAP));
        taps  = tap_pattern(k % NTAP);
        clk80 = taps[0];
      end
    end
  end

endmodule
