// tb_ttcrx_coarse_delay: a random 7-bit stream, one value per BX, goes
// through the coarse delay while the delay setting is changed every 100 BX
// over 0..15; after each change has settled, the output must equal the input
// of exactly 'delay' BX earlier.
module tb_ttcrx_coarse_delay;
  logic clk = 0, bx_en = 0;
  logic [3:0] delay = 0;
  logic [6:0] d = 0, q;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcrx_coarse_delay #(.W(7)) dut (.clk, .bx_en, .delay, .d, .q);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] hist[$];
    int idx;
    for (int n = 0; n < 3200; n++) begin
      do @(posedge clk); while (!bx_en);
      // before this edge takes effect, q shows d (the newest entry) delayed
      // by 'delay' BX
      hist.push_back(d);
      idx = hist.size() - 1 - int'(delay);
      if (n % 100 > 20) begin
        checks++;
        if (q !== hist[idx]) begin
          failures++;
          $display("FAIL delay=%0d q=%h", delay, q);
        end
      end
      if (n % 100 == 0) delay <= 4'(n / 100);
      d <= 7'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
