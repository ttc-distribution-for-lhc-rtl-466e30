// tb_ttc_encoder: checks the TDM biphase-mark line code. Random A and B bits
// are presented at each bx_en; the testbench records the four symbols of
// every BX and checks: a transition at the start of each cell, a mid-cell
// transition exactly for a 1, the A cell first, one BX of latency, and one
// bx_en every 4 clocks (four 160.32 MBaud symbols per 25 ns BX).
module tb_ttc_encoder;
  logic clk = 0, rst = 1;
  logic a, b, bx_en, line;
  int checks = 0, failures = 0;
  always #3.119 clk = ~clk;

  ttc_encoder dut (.clk, .rst, .a, .b, .bx_en, .line);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a_hist[$], b_hist[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    int   last_bx, n;
    a = 0; b = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    // wait for the first bx_en, then drive new bits after every one
    n = 0;
    while (n < 500) begin
      @(posedge clk);
      if (bx_en) begin
        if (n > 0) chk("bx_en every 4 clocks", cyc - last_bx == 4);
        last_bx = cyc;
        a_hist.push_back(a);
        b_hist.push_back(b);
        a <= 1'($urandom);
        b <= 1'($urandom);
        n++;
      end
    end
  end

  // sample the line just after every edge: the BX whose bits were taken at
  // bx_en appears in the 4 following samples (registered output)
  initial begin
    logic prev, samp, was_bx, coll;
    logic sym[4];
    int   k, i;
    k = 0; i = 0; coll = 0; prev = 0;
    @(negedge rst);
    forever begin
      @(posedge clk);
      was_bx = bx_en;
      #0.1 samp = line;
      if (coll) begin
        sym[i] = samp;
        i++;
        if (i == 4) begin
          coll = 0;
          chk("A cell start transition", sym[0] != prev);
          chk("A mid-cell", (sym[1] != sym[0]) == a_hist[k]);
          chk("B cell start transition", sym[2] != sym[1]);
          chk("B mid-cell", (sym[3] != sym[2]) == b_hist[k]);
          k++;
          if (k == 400) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
      if (was_bx) begin
        prev = samp;
        coll = 1;
        i    = 0;
      end
    end
  end
endmodule
