// ttc_hamming_enc: extended Hamming (SEC-DED) check-bit generator.
//
// Data bits fill the non-power-of-two positions 3,5,6,7,9,... of a Hamming
// codeword in order d[0], d[1], ...; check bit k is the parity of the data bits
// whose position has bit k set. The top check bit is the parity of all data and
// check bits, which lets the decoder tell single from double errors.
// DW=8 gives 5 check bits (short frames), DW=32 gives 7 (long frames).
// Combinational; no clock.
module ttc_hamming_enc #(
  parameter int unsigned DW = 8,
  parameter int unsigned CW = ttc_pkg::ham_r(DW) + 1
) (
  input  logic [DW-1:0] d,
  output logic [CW-1:0] c
);
  localparam int unsigned R = CW - 1;

  always_comb begin
    int unsigned di;
    c  = '0;
    di = 0;
    // code word positions 1..DW+R; powers of two hold check bits
    for (int unsigned pos = 1; pos <= DW + R; pos++)
      if ((pos & (pos - 1)) != 0) begin
        for (int k = 0; k < R; k++)
          if (pos[k]) c[k] ^= d[di];
        di++;
      end
    c[R] = ^{d, c[R-1:0]};
  end
endmodule
