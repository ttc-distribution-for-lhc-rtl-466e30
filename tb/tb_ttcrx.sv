// tb_ttcrx: the TTCrx receiver driven through its line input by the
// testbench's own TDM biphase-mark encoder, starting at an arbitrary symbol
// phase. The testbench loads the deskew registers with addressed cycles,
// sends bunch and event counter resets, accepts, addressed cycles (own,
// broadcast and foreign address) and user broadcasts, with one frame carrying
// a single-bit error. Checks:
//  - bunch number of each accept = BX of the accept - BX of the bunch counter
//    reset frame's start bit - 18 (frame length 16, plus two register stages);
//  - event numbers 1, 2, 3, ... and restart after an event counter reset;
//  - the accept output latency grows by exactly the coarse delay (5 BX);
//  - user broadcasts of register 2 come (coarse2 - coarse1) BX after those of
//    register 1;
//  - external addressed cycles appear for own and broadcast address only;
//  - the deskewed clock lags the plain 40 MHz clock by fine x 25/240 ns;
//  - the corrected error is counted;
//  - a read-back request returns fine 1, fine 2, coarse, control and the
//    two bytes of the receiver address, in that order, marked by rb_str.
module tb_ttcrx;
  import ttc_pkg::*;
  `include "tb_ttc_ref.svh"
  localparam logic [13:0] ME = 14'h0155;
  logic clk = 0, rst = 1, line = 0;
  logic ready, bx_en, clk40, clk40_des1, clk40_des2, l1a, bc_str, evl_str, evh_str;
  logic bc_reset, ev_reset, ext_str, rb_str;
  logic [11:0] bcnt_bus;
  logic [5:0] brcst;
  logic [7:0] ext_sub, ext_data, n_single, n_bad;
  int checks = 0, failures = 0;
  always #3.119 clk = ~clk;

  ttcrx dut (.clk, .rst, .line, .my_addr(ME), .*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- transmitter model ----------------
  logic b_q[$];          // B channel bits still to send
  logic a_next = 0;
  int   txbx = 0;        // BX being sent
  realtime t_bx;         // start time of that BX
  initial begin
    logic a, b;
    repeat (3) @(posedge clk);
    rst <= 0;
    forever begin
      a = a_next; a_next = 0;
      b = (b_q.size() > 0) ? b_q.pop_front() : 1'b1;
      t_bx = $realtime;
      @(posedge clk) line <= ~line;
      @(posedge clk) line <= line ^ a;
      @(posedge clk) line <= ~line;
      @(posedge clk) line <= line ^ b;
      txbx++;
    end
  end

  task automatic send_bits(logic [41:0] f, int len);
    for (int i = 0; i < len; i++) b_q.push_back(f[41 - i]);
    b_q.push_back(1); b_q.push_back(1);
  endtask
  task automatic send_short(logic [7:0] c);
    send_bits({ref_short(c), 26'd0}, 16);
  endtask
  task automatic send_long(logic [13:0] a, logic e, logic [7:0] s, logic [7:0] d);
    send_bits(ref_long(a, e, s, d), 42);
  endtask
  task automatic wait_idle();
    while (b_q.size() > 0) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask
  task automatic bx_wait(int n);
    int t0 = txbx;
    while (txbx < t0 + n) @(posedge clk);
  endtask

  // ---------------- receiver output monitor ----------------
  int  ev_exp = 0, bcr_start = 0, nacc = 0;
  int  acc_bx[$];
  realtime acc_t[$];
  realtime lat[$];
  int  bus_seen[$];
  // event numbers: low half in the BX after the bunch number, high after that
  int ev_seen[$];
  logic [11:0] lo;
  always @(posedge clk) if (bx_en) begin
    if (bc_str) bus_seen.push_back(int'(bcnt_bus));
    if (l1a) lat.push_back($realtime);
  end

  // issue one accept and remember its BX (sent during BX txbx+1)
  task automatic accept();
    @(posedge clk);
    while (a_next) @(posedge clk);
    a_next = 1;
    acc_bx.push_back(txbx + 1);
    wait (txbx == acc_bx[$]);
    acc_t.push_back(t_bx);
    bx_wait(4);
  endtask

  initial begin
    int n0;
    realtime l0, l1;
    @(negedge rst);
    bx_wait(100);
    chk("receiver locked", ready);
    // bunch counter reset: its start bit is sent in BX txbx at the moment
    // the queue is empty and the frame is pushed
    wait_idle();
    @(posedge clk);
    wait (b_q.size() == 0);
    send_short(8'h03);                 // bunch and event counter reset
    bcr_start = txbx + 1;
    wait_idle();
    // accepts with coarse delay 0
    for (int k = 0; k < 5; k++) begin accept(); bx_wait($urandom_range(3, 9)); end
    bx_wait(30);
    for (int k = 0; k < 5; k++) begin
      chk("bunch number", bus_seen.size() > k &&
          bus_seen[k] == (acc_bx[k] - bcr_start - 18) % 4096);
    end
    l0 = lat[0] - acc_t[0];
    // coarse delay 1 = 5, 2 = 9; fine 1 = 48, fine 2 = 200
    send_long(ME, 1'b0, 8'd2, 8'h95);
    send_long(ME, 1'b0, 8'd0, 8'd48);
    send_long(ME, 1'b0, 8'd1, 8'd200);
    wait_idle();
    n0 = lat.size();
    accept();
    bx_wait(30);
    l1 = lat[n0] - acc_t[acc_t.size() - 1];
    chk("coarse delay adds 5 BX", (l1 - l0) > 124.0 && (l1 - l0) < 126.0);
    $display("accept latency %0.2f ns, with coarse 5: %0.2f ns", l0, l1);
    nacc = 6;
    // user broadcasts: bits 5:2 on register 1, 7:6 on register 2
    fork
      begin
        realtime t1 = 0, t2 = 0;
        for (int i = 0; i < 400 && (t1 == 0 || t2 == 0); i++) begin
          @(posedge clk);
          if (bx_en && brcst[3:0] == 4'b0101 && t1 == 0) t1 = $realtime;
          if (bx_en && brcst[5:4] == 2'b10 && t2 == 0) t2 = $realtime;
        end
        chk("user broadcast 2 lags 1 by 4 BX", t2 - t1 > 99.0 && t2 - t1 < 101.0);
      end
      send_short(8'b10_0101_00);
    join
    // addressed external cycles, one with a single-bit error
    begin
      logic [41:0] f;
      int got;
      f = ref_long(ME, 1'b1, 8'h21, 8'h5a);
      f[20] ^= 1'b1;
      send_bits(f, 42);
      got = 0;
      for (int i = 0; i < 4 * 60; i++) begin
        @(posedge clk);
        if (bx_en && ext_str) got++;
        if (bx_en && ext_str) chk("external cycle data", ext_sub == 8'h21 && ext_data == 8'h5a);
      end
      chk("one external cycle (corrected)", got == 1 && n_single == 1);
      send_long(14'h0aaa, 1'b1, 8'h22, 8'h33);     // someone else
      send_long(14'h0000, 1'b1, 8'h23, 8'h44);     // everybody
      got = 0;
      for (int i = 0; i < 4 * 110; i++) begin
        @(posedge clk);
        if (bx_en && ext_str) begin
          got++;
          chk("broadcast cycle data", ext_sub == 8'h23 && ext_data == 8'h44);
        end
      end
      chk("foreign address ignored", got == 1);
    end
    // event counter reset, then two accepts: events 1 and 2
    send_short(8'h02);
    wait_idle();
    bx_wait(20);
    accept(); bx_wait(6); accept();
    bx_wait(40);
    // fine deskew: delay of each deskewed clock's rising edge after clk40's
    begin
      realtime r0, d1, d2;
      @(posedge clk40); r0 = $realtime;
      @(posedge clk40_des1); d1 = $realtime - r0;
      chk("fine deskew 1 = 48 steps", d1 > 5.0 - 0.01 && d1 < 5.0 + 0.01);
      @(posedge clk40); r0 = $realtime;
      @(posedge clk40_des2); d2 = $realtime - r0;
      chk("fine deskew 2 = 200 steps", d2 > 20.833 - 0.01 && d2 < 20.834 + 0.01);
      $display("deskew 1 %0.3f ns, deskew 2 %0.3f ns", d1, d2);
    end
    // read-back of the internal registers and the address
    begin
      logic [7:0] got_w[$];
      logic [7:0] expv[6];
      expv = '{8'd48, 8'd200, 8'h95, 8'h0f, ME[7:0], {2'b00, ME[13:8]}};
      send_long(ME, 1'b0, 8'd4, 8'h00);
      for (int i = 0; i < 4 * 70; i++) begin
        @(posedge clk);
        if (bx_en && rb_str) begin
          chk("read-back word order", int'(ext_sub) == got_w.size());
          got_w.push_back(ext_data);
        end
      end
      chk("six read-back words", got_w.size() == 6);
      if (got_w.size() == 6)
        for (int k = 0; k < 6; k++) chk("read-back value", got_w[k] == expv[k]);
    end
    chk("8 event numbers", ev_seen.size() == 8);
    if (ev_seen.size() == 8) begin
      for (int i = 0; i < 6; i++) chk("event number", ev_seen[i] == i + 1);
      chk("event number after reset", ev_seen[6] == 1 && ev_seen[7] == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (bx_en) begin
    if (evl_str) lo <= bcnt_bus;
    if (evh_str) ev_seen.push_back(int'({bcnt_bus, lo}));
  end
endmodule
