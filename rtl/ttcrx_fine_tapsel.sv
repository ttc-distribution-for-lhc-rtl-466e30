// ttcrx_fine_tapsel: tap selection for the fine deskew of the TTCrx.
//
// Two delay-locked loops divide the 25 ns BX into 16 and into 15 equal stages.
// Tap i of the 16-stage loop delays by 15*i steps of 25 ns/240 (104 ps) and tap
// j of the 15-stage loop by 16*j steps; taken in series they give
// (15*i + 16*j) mod 240 steps. Since 15 and 16 are coprime every value
// n = 0..239 is reached by exactly one pair: i = (-n) mod 16, j = n mod 15.
// The two loops, their stage counts and the 104 ps step follow the TTCrx
// description; this mapping is this design's. Values 240..255 wrap modulo 240.
// Combinational.
module ttcrx_fine_tapsel (
  input  logic [7:0] fine,
  output logic [3:0] tap16,
  output logic [3:0] tap15
);
  logic [7:0] n;

  always_comb begin
    n     = (fine >= 8'd240) ? fine - 8'd240 : fine;
    tap16 = 4'(5'd16 - {1'b0, n[3:0]});
    tap15 = 4'(n % 8'd15);
  end
endmodule
