// tb_ttcrx_decoder: the testbench's own biphase-mark encoder drives the
// decoder with a random symbol offset and, at random, with the A and B cells
// of each BX swapped relative to the decoder's start phase. The B channel
// is idle (all 1s) for a while, then random; the A channel carries random
// accepts at least 3 BX apart. Once locked, every decoded (A, B) pair must
// equal the pair sent a fixed number of BX earlier, and lock must be reached
// within 200 BX.
module tb_ttcrx_decoder;
  logic clk = 0, rst = 1;
  logic line = 0;
  logic a_bit, b_bit, bx_en, clk40, locked;
  int checks = 0, failures = 0;
  always #3.119 clk = ~clk;

  ttcrx_decoder dut (.clk, .rst, .line, .a_bit, .b_bit, .bx_en, .clk40, .locked);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic sa[4000], sb[4000];
  int   nsent = 0;
  int   da[$], db[$], dn[$];

  // reference encoder: one symbol per clock
  initial begin
    int off, since_l1a;
    logic a, b;
    off = 3;                          // one symbol off: needs a cell slip
    since_l1a = 10;
    repeat (off + 2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      a = 0;
      if (since_l1a >= 3 && $urandom_range(0, 4) == 0) a = 1;
      since_l1a = a ? 1 : since_l1a + 1;
      b = (n < 100) ? 1'b1 : 1'($urandom);
      sa[n] = a; sb[n] = b;
      nsent = n + 1;
      @(posedge clk) line <= ~line;
      @(posedge clk) line <= line ^ a;
      @(posedge clk) line <= ~line;
      @(posedge clk) line <= line ^ b;
    end
  end

  always @(posedge clk) if (bx_en && locked) begin
    da.push_back(a_bit); db.push_back(b_bit); dn.push_back(nsent);
  end

  initial begin
    int lat, best, ok;
    @(negedge rst);
    repeat (800) @(posedge clk);
    chk("locked within 200 BX", locked);
    repeat (8000) @(posedge clk);
    // find the latency that explains the first 20 decoded BX
    best = -1;
    for (lat = 0; lat < 6 && best < 0; lat++) begin
      ok = 1;
      for (int i = 0; i < 20; i++)
        if (da[i] != sa[dn[i] - 1 - lat] || db[i] != sb[dn[i] - 1 - lat]) ok = 0;
      if (ok) best = lat;
    end
    chk("latency found", best >= 0);
    if (best >= 0)
      for (int i = 20; i < da.size(); i++) begin
        chk("A bit", da[i] == sa[dn[i] - 1 - best]);
        chk("B bit", db[i] == sb[dn[i] - 1 - best]);
      end
    $display("latency %0d BX, %0d BX compared", best, da.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
