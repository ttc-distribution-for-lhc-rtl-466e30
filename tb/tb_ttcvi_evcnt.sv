// tb_ttcvi_evcnt: random accepts with random trigger types; the consumer
// takes long cycles at random moments. Checks the event counter, that each
// event yields four broadcast cycles (address 0, E=1, subaddresses 0..3 with
// trigger type and the three event-number bytes) in event order, that events
// arriving at a full queue are counted as dropped and not sent, and the
// counter reset.
module tb_ttcvi_evcnt;
  import ttc_pkg::*;
  logic clk = 0, rst = 1, bx_en = 0;
  logic l1a = 0, bcast_en = 1, ev_reset = 0, cmd_take = 0, cmd_valid;
  logic [7:0] trig_type = 0;
  logic [23:0] ev_num;
  long_cmd_t cmd;
  logic [15:0] n_dropped;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcvi_evcnt dut (.*);

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

  logic [31:0] expq[$];
  int ref_ev = 0, ref_drop = 0, n_taken = 0;

  // producer: one decision per BX
  initial begin
    int since = 9;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 20000; n++) begin
      do @(posedge clk); while (!bx_en);
      // DUT samples l1a/trig_type now
      chk("event number", ev_num == 24'(ref_ev));
      if (l1a) begin
        ref_ev++;
        // the queue still holds an event whose last cycle is taken at this edge
        if (expq.size() + ((cmd_take && sub_i == 0) ? 1 : 0) >= 16) ref_drop++;
        else expq.push_back({trig_type, 24'(ref_ev)});
      end
      since = l1a ? 1 : since + 1;
      l1a       <= since >= 2 && ($urandom_range(0, (n < 10000) ? 40 : 4) == 0);
      trig_type <= 8'($urandom);
      if (n == 15000) begin
        @(posedge clk) ev_reset <= 1;
        @(posedge clk) ev_reset <= 0;
        ref_ev = 0;
      end
    end
    chk("drops counted", n_dropped == 16'(ref_drop) && ref_drop > 0);
    $display("%0d events, %0d dropped", ref_ev, ref_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: takes a cycle now and then, as the B channel would
  int sub_i = 0;
  always @(posedge clk) begin
    cmd_take <= 0;
    if (cmd_valid && !cmd_take && $urandom_range(0, 40) == 0) begin
      cmd_take <= 1;
      checks++;
      if (expq.size() == 0 || cmd.addr != 0 || !cmd.e || cmd.sub != 8'(sub_i) ||
          cmd.data != expq[0][8*(3-sub_i) +: 8]) begin
        failures++;
        $display("FAIL cycle %0d of event: sub=%0d data=%h exp %h", sub_i, cmd.sub, cmd.data, expq[0]);
      end
      if (sub_i == 3) begin
        sub_i = 0;
        if (expq.size() > 0) void'(expq.pop_front());
        n_taken++;
      end else sub_i++;
    end
  end
endmodule
