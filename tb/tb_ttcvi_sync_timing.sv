// tb_ttcvi_sync_timing: with a short internal orbit (200 BX) and then an
// external orbit pulse of random period, checks for several delay and
// hold-off settings that the orbit output has the right period, that sync_go
// comes exactly 'delay' BX after each orbit pulse, and that holdoff is high in
// exactly the hold_len BX before it.
module tb_ttcvi_sync_timing;
  localparam int ORB = 200;
  logic clk = 0, rst = 1, bx_en = 0;
  logic ext_orbit = 0, int_orbit = 1, enable = 1;
  logic [11:0] delay = 150;
  logic [7:0]  hold_len = 44;
  logic orbit, sync_go, holdoff;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcvi_sync_timing #(.ORBIT_LEN(ORB)) dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe: count BX since the last orbit output
  int since = -1, last_orb = -1, nbx = 0, n_sync = 0, n_orb = 0;
  int period = ORB;
  always @(posedge clk) if (bx_en && !rst) begin
    nbx++;
    ext_orbit <= (nbx % 300 == 0);
    if (orbit) begin
      if (last_orb >= 0 && n_orb > 1) chk("orbit period", nbx - last_orb == period);
      last_orb = nbx;
      since = 0;
      n_orb++;
    end else if (since >= 0) since++;
    if (since >= 0 && n_orb > 1) begin
      chk("sync_go position", sync_go == (since == int'(delay)));
      chk("holdoff window", holdoff == (since >= int'(delay) - int'(hold_len) && since < int'(delay)));
      if (sync_go) n_sync++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      delay    <= 12'(60 + 30 * k);
      hold_len <= 8'(44 + 5 * k);
      n_orb = 0;
      repeat (4 * ORB * 5) @(posedge clk);
    end
    // external orbit, period 300 BX
    int_orbit <= 0;
    period = 300;
    n_orb = 0;
    repeat (4 * 300 * 6) @(posedge clk);
    repeat (40) @(posedge clk);
    chk("sync cycles issued", n_sync >= 15);
    $display("%0d sync cycles", n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
