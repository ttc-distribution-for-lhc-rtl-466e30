// tb_ttcvi_rate: the TTCvi at its default size under the expected level-1
// rate of 100 kHz with the event-number broadcast switched on.
//
// The internal emulator is set to 164/65536 per BX (100.3 kHz at 40.08 MHz)
// and runs for 800k BX (20 ms) with internal orbits and synchronous bunch
// counter resets. The B channel is parsed bit by bit, independently of the
// module: every frame is checked against a reference encoder including its
// check bits, event broadcasts are reassembled from their four long cycles
// (subaddress 0 = trigger type, 1..3 = event number) and must carry the
// event numbers 1, 2, 3, ... in order. The test checks:
//  - the accept rate is within 8% of 100 kHz;
//  - no event broadcast is dropped and no synchronous cycle is late, i.e.
//    a 16-event queue and the B channel bandwidth suffice at this rate;
//  - one event broadcast, when the channel is free, takes about 4.4 us
//    (between 4.2 and 4.5 us from its first start bit to its last stop bit);
//  - one bunch counter reset per orbit.
// The rate, the 4.4 us and the orbit come from the TTC description; the
// emulator setting and the run length are this testbench's own.
module tb_ttcvi_rate;
  import ttc_pkg::*;
  `include "tb_ttc_ref.svh"
  localparam int RUN_BX = 800_000, THR = 164;
  logic clk = 0, rst = 1, bx_en = 0;
  logic we = 0;
  logic [3:0] addr = 0;
  logic [31:0] wdata = 0;
  logic [3:0] ext_trig = 0;
  logic ext_orbit = 0;
  logic [7:0] trig_type = 0;
  logic a_bit, b_bit, orbit;
  logic [23:0] ev_num;
  logic [15:0] n_inhibited, n_dropped, n_late;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 3);
    cyc <= cyc + 1;
  end

  ttcvi dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // B channel parser
  int bx = 0, n_acc = 0, n_sync = 0, n_long = 0, n_orbit = 0;
  int flen = 0, fstart = 0, next_ev = 1, sub_exp = 0, ev_start = 0;
  int min_ev_bx = 1_000_000;
  logic [41:0] fr;
  logic [23:0] ev_bytes;
  logic in_frame = 0;
  always @(posedge clk) if (bx_en && !rst) begin
    bx <= bx + 1;
    trig_type <= 8'($urandom);
    if (a_bit) n_acc++;
    if (orbit) n_orbit++;
    if (!in_frame) begin
      if (!b_bit) begin in_frame = 1; flen = 1; fr = '0; fstart = bx; end
    end else begin
      fr = {fr[40:0], b_bit};
      flen++;
      if (flen == SHORT_LEN && !fr[14]) begin
        chk("short frame", fr[15:0] == ref_short(fr[13:6]));
        if (fr[13:6] == 8'h01) n_sync++;
        in_frame = 0;
      end else if (flen == LONG_LEN) begin
        logic [13:0] a;
        logic e;
        logic [7:0] s, d;
        a = fr[39:26]; e = fr[25]; s = fr[23:16]; d = fr[15:8];
        chk("long frame check bits", fr == ref_long(a, e, s, d));
        n_long++;
        if (a == 0 && e) begin
          chk("event broadcast subaddress order", int'(s) == sub_exp);
          if (s == 0) ev_start = fstart;
          if (s != 0) ev_bytes[8*(3 - int'(s)) +: 8] = d;
          sub_exp = (sub_exp + 1) % 4;
          if (s == 3) begin
            chk("event numbers in order", int'(ev_bytes) == next_ev);
            next_ev++;
            if (bx - ev_start + 1 < min_ev_bx) min_ev_bx = bx - ev_start + 1;
          end
        end
        in_frame = 0;
      end
    end
  end

  task automatic vme(int a, logic [31:0] d);
    @(posedge clk) begin we <= 1; addr <= 4'(a); wdata <= d; end
    @(posedge clk) we <= 0;
  endtask

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate_khz, t_ev_us;
    repeat (8) @(posedge clk);
    rst <= 0;
    vme(2, 32'h7);
    vme(1, THR);
    vme(0, 4);
    while (bx < RUN_BX) @(posedge clk);
    vme(0, 7);
    while (bx < RUN_BX + 4000) @(posedge clk);
    rate_khz = n_acc / (RUN_BX * 25.0e-9) / 1000.0;
    t_ev_us  = min_ev_bx * 25.0e-3;
    $display("accepts %0d (%0.1f kHz), event broadcasts %0d, long frames %0d, sync %0d, orbits %0d, dropped %0d, late %0d, shortest broadcast %0d BX = %0.2f us",
             n_acc, rate_khz, next_ev - 1, n_long, n_sync, n_orbit, n_dropped, n_late, min_ev_bx, t_ev_us);
    chk("accept rate near 100 kHz", rate_khz > 92.0 && rate_khz < 108.0);
    chk("every accept broadcast", next_ev - 1 == n_acc && int'(ev_num) == n_acc);
    chk("no broadcast dropped", n_dropped == 0);
    chk("no sync cycle late", n_late == 0);
    chk("event broadcast about 4.4 us", t_ev_us >= 4.2 && t_ev_us <= 4.5);
    chk("one bunch counter reset per orbit", n_sync >= n_orbit - 1 && n_sync <= n_orbit + 1 && n_orbit > 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
