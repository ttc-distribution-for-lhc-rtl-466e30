// ttc_hamming_dec: extended Hamming (SEC-DED) checker and corrector for B
// channel frames.
//
// It recomputes the check bits of the received data (same layout as
// ttc_hamming_enc), forms the syndrome and the overall parity, and:
//   syndrome 0, parity ok   -> no error
//   parity wrong            -> single error: a data bit at the syndrome's
//                              position is flipped; an error in a check bit
//                              leaves the data as it is
//   syndrome != 0, parity ok -> double error, uncorrectable
// A syndrome that points past the codeword is also reported as uncorrectable.
// Combinational; no clock.
module ttc_hamming_dec #(
  parameter int unsigned DW = 8,
  parameter int unsigned CW = ttc_pkg::ham_r(DW) + 1
) (
  input  logic [DW-1:0] d,
  input  logic [CW-1:0] c,
  output logic [DW-1:0] q,        // corrected data
  output logic          err1,   // a single error was found (and corrected)
  output logic          err2    // an uncorrectable error was found
);
  localparam int unsigned R = CW - 1;

  logic [CW-1:0] c_calc;
  logic [R-1:0]  syn;
  logic          par;

  ttc_hamming_enc #(.DW(DW), .CW(CW)) u_enc (.d(d), .c(c_calc));

  always_comb begin : correct
    int unsigned di;
    di     = 0;
    syn    = c[R-1:0] ^ c_calc[R-1:0];
    par    = ^{d, c};
    q      = d;
    err1 = 1'b0;
    err2 = 1'b0;
    if (par) begin
      err1 = 1'b1;
      if (syn != '0 && int'(syn) > DW + R) begin
        err1 = 1'b0;
        err2 = 1'b1;
      end
      for (int unsigned pos = 1; pos <= DW + R; pos++)
        if ((pos & (pos - 1)) != 0) begin
          if (pos == int'(syn)) q[di] = ~d[di];
          di++;
        end
    end else if (syn != '0) begin
      err2 = 1'b1;
    end
  end
endmodule
