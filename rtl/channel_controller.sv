// channel_controller: picks which channel buffer is emptied next.
//
// Every channel buffer holding a complete hit raises its request. When the
// encoder can take a word (ready), the controller grants one requesting
// channel, pops that channel's buffer (one-cycle rd pulse) and hands the
// channel number to the encoder. The choice is round robin, starting from the
// channel after the last one granted, so no busy channel can starve another.
// One grant per cycle at most; grant/rd are combinational from req and ready
// and the round-robin pointer is the only state. The chip only says that a
// controller selects the buffer of a channel with a hit; round robin is this
// design's choice.
`timescale 1ps/1ps
module channel_controller #(
  parameter int unsigned N = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 ready,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic [N-1:0]         rd
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last;

  always_comb begin
    int unsigned idx;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(idx);
      end
    end
    gnt_valid = gnt_valid && ready;
    rd = '0;
    if (gnt_valid) rd[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         last <= IW'(N-1);
    else if (gnt_valid) last <= gnt_idx;
  end

endmodule
