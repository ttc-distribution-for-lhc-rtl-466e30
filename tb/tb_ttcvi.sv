// tb_ttcvi: TTCvi module through its register port, with a 400-BX internal
// orbit. External triggers arrive on input 0; the event-number broadcast is
// on; short and long commands are written from the bus. The A and B channel
// outputs are decoded by the testbench's own frame parser and checked:
//  - every frame carries correct check bits;
//  - the bunch counter reset frame starts exactly 'delay' BX after each
//    orbit, and never collides with another frame;
//  - each accept is followed by four broadcast cycles carrying its trigger
//    type and event number (counted from the A channel), in order, and a
//    broadcast that finds the channel free ends within 176 BX (4.4 us) of
//    the accept;
//  - every bus-written command is sent exactly once.
module tb_ttcvi;
  import ttc_pkg::*;
  `include "tb_ttc_ref.svh"
  localparam int ORB = 400, DELAY = 300;
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

  ttcvi #(.ORBIT_LEN(ORB)) dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [31:0] d);
    @(posedge clk);
    we <= 1; addr <= 4'(a); wdata <= d;
    @(posedge clk);
    we <= 0;
  endtask

  logic [7:0]  exp_short[$];
  logic [31:0] exp_long[$];     // {E, 1'b0, addr, sub, data}
  int n_ev = 0, n_sync = 0, n_ev_frames = 0, n_ok_ev = 0, min_dur = 100000;
  logic [31:0] ev_q[$];         // {type, event} expected in the broadcast

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wr(2, 32'h7);                 // internal orbit, broadcast on, sync on
    wr(3, DELAY);
    wr(4, 50);
    wr(0, 0);                     // external trigger input 0
    for (int k = 0; k < 4 * 12000; k++) begin
      @(posedge clk);
      if (bx_en) begin
        ext_trig[0] <= ($urandom_range(0, 400) == 0);
        trig_type   <= 8'($urandom);
        if ($urandom_range(0, 400) == 0) begin
          logic [7:0] c;
          c = 8'($urandom) & 8'hfc;
          exp_short.push_back(c);
          wr(6, {24'd0, c});
        end
        if ($urandom_range(0, 300) == 0) begin
          logic [31:0] l;
          l = {1'($urandom), 1'b0, 14'($urandom) | 14'h1, 8'($urandom), 8'($urandom)};
          exp_long.push_back(l);
          wr(7, l);
        end
      end
    end
    ext_trig <= 0;
    repeat (4 * 3000) @(posedge clk);
    chk("all short commands sent", exp_short.size() == 0);
    chk("all long commands sent", exp_long.size() == 0);
    chk("all event broadcasts sent", ev_q.size() == 0 && n_ok_ev == n_ev && n_ev > 10);
    chk("sync cycles", n_sync >= 15);
    chk("no late sync", n_late == 0);
    chk("no broadcast dropped", n_dropped == 0);
    chk("broadcast within 176 BX when free", min_dur >= 170 && min_dur <= 176);
    $display("%0d accepts, %0d sync frames, broadcast %0d BX", n_ev, n_sync, min_dur);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: a_bit/b_bit change at bx_en, sampled at the next bx_en
  initial begin
    int since_orb = -1, len = 0, n = 0, nbx = 0, ev_start = -1, ev_idle_start = -1;
    logic [41:0] fr;
    logic [7:0]  tt_now;
    @(negedge rst);
    forever begin
      @(posedge clk);
      if (bx_en) begin
        nbx++;
        // orbit output marks BX 0 of the orbit counter (registered like b_bit)
        if (orbit) since_orb = 0; else if (since_orb >= 0) since_orb++;
        if (a_bit) begin
          n_ev++;
          ev_q.push_back({trig_type, 24'(n_ev)});   // type sampled with the accept
          if (ev_q.size() == 1 && len == 0) ev_start = nbx;
        end
        if (len == 0 && b_bit == 0) begin
          fr = '0; n = 1; len = 16;
        end else if (len != 0) begin
          fr[41 - n] = b_bit;
          n++;
          if (n == 2 && b_bit) len = 42;
          if (n == len) begin
            len = 0;
            if (fr[40] == 0) begin
              checks++;
              if (fr[41:26] != ref_short(fr[39:32])) begin failures++; $display("FAIL short check bits"); end
              if (fr[39:32] == 8'h01) begin
                n_sync++;
                chk("sync frame position", since_orb == DELAY + 16);
                if (since_orb != DELAY + 16) $display("sync at %0d", since_orb);
              end else begin
                chk("short command", exp_short.size() > 0 && exp_short[0] == fr[39:32]);
                if (exp_short.size() > 0) void'(exp_short.pop_front());
              end
            end else begin
              logic [31:0] pl;
              pl = fr[39:8];
              checks++;
              if (fr != ref_long(pl[31:18], pl[17], pl[15:8], pl[7:0])) begin failures++; $display("FAIL long check bits %b", fr); end
              if (pl[31:18] == 0) begin
                chk("event cycle", ev_q.size() > 0 && pl[17] && pl[15:8] == 8'(n_ev_frames % 4) &&
                     pl[7:0] == ev_q[0][8*(3 - n_ev_frames % 4) +: 8]);
                n_ev_frames++;
                if (n_ev_frames % 4 == 0) begin
                  void'(ev_q.pop_front());
                  n_ok_ev++;
                  if (ev_start >= 0) begin
                    if (nbx - ev_start < min_dur) min_dur = nbx - ev_start;
                    ev_start = -1;
                  end
                end
              end else begin
                chk("long command", exp_long.size() > 0 &&
                    exp_long[0] == {pl[17], 1'b0, pl[31:18], pl[15:8], pl[7:0]});
                if (exp_long.size() > 0) void'(exp_long.pop_front());
              end
            end
          end
        end
      end
    end
  end
endmodule
