// tb_ttc_hamming: self-checking test of the SEC-DED check-bit encoder and
// decoder for 8-bit (short frame) and 32-bit (long frame) data.
// Expected check bits come from a reference that builds the whole codeword
// bit by bit. For random data it checks: clean decode; every single-bit error
// (data or check bit) corrected and flagged; random double errors flagged as
// uncorrectable.
module tb_ttc_hamming;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  d8,  q8,  e8;
  logic [4:0]  c8,  x8;
  logic        s8, m8;
  logic [31:0] d32, q32, e32;
  logic [6:0]  c32, x32;
  logic        s32, m32;

  ttc_hamming_enc #(.DW(8))  enc8  (.d(d8),  .c(c8));
  ttc_hamming_dec #(.DW(8))  dec8  (.d(e8),  .c(x8),  .q(q8),  .err1(s8),  .err2(m8));
  ttc_hamming_enc #(.DW(32)) enc32 (.d(d32), .c(c32));
  ttc_hamming_dec #(.DW(32)) dec32 (.d(e32), .c(x32), .q(q32), .err1(s32), .err2(m32));

  // reference: place data at non-power-of-two positions, check bit k =
  // parity of positions with bit k set, top bit = parity of everything
  function automatic logic [6:0] ref_chk(logic [31:0] d, int dw, int r);
    logic [6:0] c = '0;
    int pos = 1, di = 0;
    while (di < dw) begin
      if ((pos & (pos - 1)) != 0) begin
        for (int k = 0; k < r; k++) if ((pos >> k) & 1) c[k] ^= d[di];
        di++;
      end
      pos++;
    end
    for (int i = 0; i < dw; i++) c[r] ^= d[i];
    for (int k = 0; k < r; k++) c[r] ^= c[k];
    return c;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b1, b2;
    logic [12:0] w8;
    logic [38:0] w32;
    for (int t = 0; t < 200; t++) begin
      d8  = 8'($urandom);
      d32 = $urandom;
      #1;
      chk("enc8 ref",  c8  == ref_chk({24'd0, d8}, 8, 4)[4:0]);
      chk("enc32 ref", c32 == ref_chk(d32, 32, 6));
      // clean
      e8 = d8; x8 = c8; e32 = d32; x32 = c32; #1;
      chk("clean8",  q8 == d8 && !s8 && !m8);
      chk("clean32", q32 == d32 && !s32 && !m32);
      // single errors anywhere in the 13- / 39-bit word
      b1 = $urandom_range(0, 12);
      w8 = {c8, d8} ^ (13'd1 << b1);
      {x8, e8} = w8;
      b1 = $urandom_range(0, 38);
      w32 = {c32, d32} ^ (39'd1 << b1);
      {x32, e32} = w32; #1;
      chk("single8",  q8 == d8 && s8 && !m8);
      chk("single32", q32 == d32 && s32 && !m32);
      // double errors
      b1 = $urandom_range(0, 12);
      do b2 = $urandom_range(0, 12); while (b2 == b1);
      w8 = {c8, d8} ^ (13'd1 << b1) ^ (13'd1 << b2);
      {x8, e8} = w8;
      b1 = $urandom_range(0, 38);
      do b2 = $urandom_range(0, 38); while (b2 == b1);
      w32 = {c32, d32} ^ (39'd1 << b1) ^ (39'd1 << b2);
      {x32, e32} = w32; #1;
      chk("double8",  m8 && !s8);
      chk("double32", m32 && !s32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
