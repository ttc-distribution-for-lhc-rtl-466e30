// tb_ttcrx_id_counters: random accepts (at least 3 BX apart), bunch counter
// resets every 3564 BX and occasional event counter resets. A reference bunch
// and event count kept by the testbench is compared with the 12-line output:
// bunch number in the BX after the accept, then event[11:0], then
// event[23:12], each with its own strobe. Also checks the 12-bit wrap of the
// bunch counter without resets and a 24-bit event counter roll-over.
module tb_ttcrx_id_counters;
  logic clk = 0, rst = 1, bx_en = 0;
  logic l1a = 0, bc_reset = 0, ev_reset = 0;
  logic [11:0] bus, bcnt;
  logic [23:0] evcnt;
  logic bc_str, evl_str, evh_str;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcrx_id_counters dut (.clk, .rst, .bx_en, .l1a, .bc_reset, .ev_reset,
    .out_en(1'b1), .bus, .bc_str, .evl_str, .evh_str, .bcnt, .evcnt);

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

  initial begin
    int rb = 0, re = 0, since = 9, seq = 0, n_l1a = 0, n_wrap = 0;
    int exp_b = 0, exp_e = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 20000; n++) begin
      do @(posedge clk); while (!bx_en);
      // check the outputs registered at the previous step
      if (seq == 1) chk("bunch number", bc_str && !evl_str && bus == 12'(exp_b));
      if (seq == 2) chk("event low",  evl_str && !bc_str && bus == 12'(exp_e));
      if (seq == 3) chk("event high", evh_str && bus == 12'(exp_e >> 12));
      if (seq == 0) chk("no strobe", !bc_str && !evl_str && !evh_str);
      seq = (seq == 0 || seq == 3) ? 0 : seq + 1;
      // the DUT takes this step's inputs (set at the previous step) now
      if (l1a) begin
        exp_b = rb;
        re    = (ev_reset ? 0 : re) + 1;
        exp_e = re;
        seq   = 1;
        n_l1a++;
      end else if (ev_reset) re = 0;
      rb = bc_reset ? 0 : (rb + 1) % 4096;
      if (rb == 0 && !bc_reset) n_wrap++;
      // next inputs
      since = l1a ? 1 : since + 1;
      l1a      <= (since >= 2) && ($urandom_range(0, 9) == 0);
      bc_reset <= (n < 10000) && (n % 3564 == 100);
      ev_reset <= ($urandom_range(0, 2999) == 0);
      if (n == 15000) begin
        // jump near the 24-bit roll-over
        force dut.evcnt = 24'hfffffd;
        @(posedge clk);
        release dut.evcnt;
        re = 24'hfffffd;
      end
      re = re % (1 << 24);
    end
    chk("bunch counter wrapped", n_wrap > 0);
    chk("triggers seen", n_l1a > 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
