// ttcrx_decoder: biphase-mark decoder and A/B demultiplexer of the TTCrx.
//
// line is sampled once per symbol by the recovered 160.32 MHz clock. A symbol
// phase counter ph labels the samples 0..3 within a BX: 0-1 = A cell,
// 2-3 = B cell. Two ambiguities are resolved from the data itself:
//  - cell phase: every cell starts with a transition. If no transition is
//    seen at a sample labelled as a cell start, the labelling is one symbol
//    off and ph is held for one clock to move it.
//  - channel phase: the idle B channel is a run of 1s, while the A channel
//    can never carry 1s in consecutive BX (accepts are at least 3 BX apart).
//    A 1 in the cell taken as A in two consecutive BX means the two channels
//    are swapped; ph then jumps by two symbols.
// locked rises after LOCK_BX consecutive BX without either correction and
// falls at any correction. The use of the B channel structure to settle the
// phase follows the TTCrx description; the rules above are this design's.
// Outputs: a_bit and b_bit are registered and held for one BX; bx_en is high
// for one clock per BX, in the clock after they change.
module ttcrx_decoder #(
  parameter int unsigned LOCK_BX = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic line,
  output logic a_bit,
  output logic b_bit,
  output logic bx_en,
  output logic clk40,    // non-deskewed 40 MHz clock (high in the A cell)
  output logic locked
);
  logic       prev, t;
  logic [1:0] ph;
  logic       a_cur, a_last;
  logic [7:0] good;
  logic       slip, swap;

  assign t     = line ^ prev;
  assign slip  = !ph[0] && !t;                      // no transition at cell start
  assign swap  = (ph == 2'd3) && !slip && a_cur && a_last;
  assign clk40 = !ph[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      prev   <= 1'b0;
      ph     <= 2'd0;
      a_cur  <= 1'b0;
      a_last <= 1'b0;
      a_bit  <= 1'b0;
      b_bit  <= 1'b1;
      bx_en  <= 1'b0;
      good   <= '0;
      locked <= 1'b0;
    end else begin
      prev  <= line;
      bx_en <= 1'b0;
      if (slip) begin
        good   <= '0;
        locked <= 1'b0;
      end else if (swap) begin
        ph     <= 2'd2;
        a_last <= 1'b0;
        good   <= '0;
        locked <= 1'b0;
      end else begin
        ph <= ph + 1'b1;
        if (ph == 2'd1) a_cur <= t;
        if (ph == 2'd3) begin
          a_last <= a_cur;
          a_bit  <= a_cur;
          b_bit  <= t;
          bx_en  <= 1'b1;
          if (good != 8'(LOCK_BX)) good <= good + 1'b1;
          else                     locked <= 1'b1;
        end
      end
    end
  end
endmodule
