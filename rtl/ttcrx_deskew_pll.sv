// ttcrx_deskew_pll: behavioural model (not synthesizable) of the fine deskew
// of the TTCrx: two staggered delay-locked loops of 16 and 15 voltage-
// controlled delay stages locked to the 25 ns BX period, each followed by a
// tap multiplexer.
//
// The analog loops are replaced by ideal delays: the output clock is the input
// 40 MHz clock delayed by tap16 x 25/16 ns plus tap15 x 25/15 ns, modulo
// 25 ns, which gives 240 phases 104.2 ps apart (see ttcrx_fine_tapsel). The
// output keeps the input's duty cycle; a tap change takes effect at the next
// edge of the input. Stage counts and step follow the TTCrx description.
module ttcrx_deskew_pll (
  input  logic       clk_in,   // non-deskewed 40 MHz clock
  input  logic [3:0] tap16,
  input  logic [3:0] tap15,
  output logic       clk_out
);

  localparam int unsigned PERIOD_PS = 25000;

  int unsigned dly_ps;

  always_comb begin
    dly_ps = (int'(tap16) * PERIOD_PS) / 16 + (int'(tap15) * PERIOD_PS) / 15;
    if (dly_ps >= PERIOD_PS) dly_ps = dly_ps - PERIOD_PS;
  end

  initial clk_out = 1'b0;

  // Each input edge launches its own delayed copy, so delays longer than
  // half a period are reproduced exactly (transport delay).
  always @(posedge clk_in) begin
    automatic int unsigned d = dly_ps;
    fork
      #(d * 1ps) clk_out = 1'b1;
    join_none
  end

  always @(negedge clk_in) begin
    automatic int unsigned d = dly_ps;
    fork
      #(d * 1ps) clk_out = 1'b0;
    join_none
  end
endmodule
