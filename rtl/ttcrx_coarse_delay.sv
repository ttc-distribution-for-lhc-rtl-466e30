// ttcrx_coarse_delay: programmable-length shift register for the coarse
// deskew of the TTCrx.
//
// A W-bit signal that changes once per BX is delayed by 0..DEPTH-1 whole BX
// (0..15 x 25 ns with the default DEPTH of 16, as in the TTCrx). The signal is
// shifted into a DEPTH-1 stage register each BX and the output is taken from
// the stage chosen by delay, so changing the delay never disturbs the shift
// register itself. delay 0 passes d straight through.
// Timing: d is sampled at bx_en; q follows the selected stage combinationally.
module ttcrx_coarse_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     bx_en,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic [W-1:0]             d,
  output logic [W-1:0]             q
);
  logic [W-1:0] stage [DEPTH-1];

  always_ff @(posedge clk) begin
    if (bx_en) begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH) - 1; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = (delay == '0) ? d : stage[delay - 1'b1];
endmodule
