// ttc_encoder: time-division multiplexer and biphase-mark encoder of the TTC
// transmitter.
//
// Each bunch crossing (25 ns) is split into an A channel cell and a B channel
// cell of two 160.32 MBaud symbols each. Biphase mark: the line level toggles
// at the start of every cell, and toggles again in the middle of the cell for
// a 1. There is thus a transition at the start and at the end of every BX
// whatever the data, the line is DC-balanced, and the four possible BX
// patterns (A,B = 00, 01, 10, 11) carry the trigger and command bits. This
// follows the TTC signal encoding; the order A cell first is this design's
// choice.
// Clocking: clk is the 160.32 MHz encoder clock (phase-locked to the LHC clock
// in the real system). The encoder keeps the symbol phase and emits bx_en in
// the last symbol of each BX; a and b are sampled there and sent during the
// next BX. line is registered.
module ttc_encoder (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic bx_en,
  output logic line
);
  logic [1:0] ph;
  logic       a_q, b_q;
  logic       flip;

  assign bx_en = (ph == 2'd3);

  always_comb begin
    unique case (ph)
      2'd0: flip = 1'b1;     // start of A cell
      2'd1: flip = a_q;      // middle of A cell
      2'd2: flip = 1'b1;     // start of B cell
      2'd3: flip = b_q;      // middle of B cell
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph   <= 2'd0;
      a_q  <= 1'b0;
      b_q  <= 1'b1;
      line <= 1'b0;
    end else begin
      ph   <= ph + 1'b1;
      line <= line ^ flip;
      if (bx_en) begin
        a_q <= a;
        b_q <= b;
      end
    end
  end
endmodule
