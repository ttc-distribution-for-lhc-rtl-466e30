// tb_ttcvi_trigger: checks the trigger source selector and emulator.
//  - external sources: each of the 4 inputs selected in turn, driven at
//    random; the output must follow the selected input one BX later unless
//    within 2 BX of the previous accept, and suppressed ones are counted;
//  - emulator: with thresholds 0, 6554 (10 %) and 65535 the accept rate per
//    free BX must be 0, near 10 % and 100 %;
//  - single shot: every request gives exactly one accept.
module tb_ttcvi_trigger;
  logic clk = 0, rst = 1, bx_en = 0;
  logic [3:0] ext_trig = 0;
  logic [2:0] sel = 7;
  logic [15:0] rate_thr = 0, n_inhibited;
  logic shot = 0, l1a;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcvi_trigger dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic next_bx();
    do @(posedge clk); while (!bx_en);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since, n_inh, n_acc, n_free;
    logic exp_l1a, cand;
    repeat (3) @(posedge clk);
    rst <= 0;
    // external inputs
    since = 9; n_inh = 0;
    for (int s = 0; s < 4; s++) begin
      sel <= 3'(s);
      next_bx();
      next_bx();
      since = 9;
      for (int n = 0; n < 2000; n++) begin
        ext_trig <= 4'($urandom);
        next_bx();                 // DUT samples ext_trig here
        cand = ext_trig[s];
        exp_l1a = cand && since >= 3;
        if (cand && since < 3) n_inh++;
        since = exp_l1a ? 1 : since + 1;
        next_bx();                 // ... and shows l1a here
        ext_trig <= 0;
        chk("external accept", l1a == exp_l1a);
        since++;
      end
    end
    chk("inhibited count", n_inhibited == 16'(n_inh));
    // emulator rates
    sel <= 3'd4;
    for (int i = 0; i < 3; i++) begin
      int thr;
      thr = (i == 0) ? 0 : (i == 1) ? 6554 : 65535;
      rate_thr <= 16'(thr);
      next_bx(); next_bx(); next_bx();
      n_acc = 0; n_free = 0; since = 9;
      for (int n = 0; n < 30000; n++) begin
        next_bx();
        if (since >= 3) n_free++;
        if (l1a) begin
          n_acc++;
          chk("accept spacing", since >= 3);
          since = 1;
        end else since++;
      end
      if (i == 0) chk("rate 0", n_acc == 0);
      if (i == 1) chk("rate 10 %", n_acc * 1000 > n_free * 90 && n_acc * 1000 < n_free * 110);
      if (i == 2) chk("rate 100 %", n_acc * 3 >= 29990);
      $display("threshold %0d: %0d accepts in %0d free BX", thr, n_acc, n_free);
    end
    // single shots
    sel <= 3'd5;
    next_bx(); next_bx(); next_bx(); next_bx();
    n_acc = 0;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk) shot <= 1;
      @(posedge clk) shot <= 0;
      repeat (10) begin
        next_bx();
        if (l1a) n_acc++;
      end
    end
    chk("one accept per shot", n_acc == 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
