// tb_ttcvi_bchan: checks the B channel serializer. Short and long commands are
// offered at random while synchronous cycles are requested with a hold-off
// window in front of them. The serial output is compared bit by bit with
// frames built by the reference model, in the expected order (sync first,
// then async short, then long); each sync frame must start in exactly the BX
// of its sync_go; frames are separated by at least 2 idle bits; a long frame
// takes 42 BX.
module tb_ttcvi_bchan;
  import ttc_pkg::*;
  `include "tb_ttc_ref.svh"
  logic clk = 0, rst = 1, bx_en = 0;
  logic sync_go = 0, holdoff = 0, s_valid = 0, l_valid = 0;
  logic [7:0] sync_cmd = 8'h01, s_cmd = 0;
  long_cmd_t l_cmd;
  logic s_take, l_take, b_bit, busy;
  logic [15:0] n_late;
  int checks = 0, failures = 0;
  int bx = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (bx % 4 == 2);
    bx <= bx + 1;
  end

  ttcvi_bchan dut (.*);

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

  // expected frames in order of transmission
  logic [41:0] exp_frame[$];
  int          exp_len[$];
  int          sync_bx[$];
  int          nbx = 0;
  int          n_sync = 0, n_sync_ok = 0;

  // stimulus, one step per bx_en
  initial begin
    int n_s = 0, n_l = 0, sync_at;
    l_cmd = '0;
    l_cmd.addr = 14'h1234;
    repeat (5) @(posedge clk);
    rst <= 0;
    sync_at = 300;
    while (nbx < 6000) begin
      @(posedge clk);
      if (bx_en) begin
        nbx++;
        // sync cycles every 400 BX with a 50-BX hold-off
        sync_go <= (nbx == sync_at);
        holdoff <= (nbx >= sync_at - 50) && (nbx < sync_at);
        if (nbx == sync_at) begin
          exp_frame.push_back({ref_short(sync_cmd), 26'h3ffffff}); exp_len.push_back(16);
          sync_bx.push_back(nbx + 2);  // taken at the next bx_en, seen one later
          n_sync++;
          sync_at += 400;
        end
        if (s_take) begin
          exp_frame.push_back({ref_short(s_cmd), 26'h3ffffff}); exp_len.push_back(16);
          s_valid <= 0;
        end else if (l_take) begin
          exp_frame.push_back(ref_long(l_cmd.addr, l_cmd.e, l_cmd.sub, l_cmd.data)); exp_len.push_back(42);
          l_valid <= 0;
        end
        if (!s_valid && !s_take && $urandom_range(0, 30) == 0) begin
          s_valid <= 1; s_cmd <= 8'($urandom);
        end
        if (!l_valid && !l_take && $urandom_range(0, 10) == 0) begin
          l_valid <= 1;
          l_cmd   <= '{addr: 14'($urandom), e: 1'($urandom), sub: 8'($urandom), data: 8'($urandom)};
        end
      end
    end
    // drain
    s_valid <= 0; l_valid <= 0;
    repeat (400) @(posedge clk);
    chk("all frames sent", exp_frame.size() == 0);
    chk("no late sync", n_late == 0);
    chk("every sync frame started in its BX", n_sync_ok == n_sync && n_sync > 10);
    $display("%0d sync frames", n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: b_bit changes at bx_en; sample it at the next bx_en
  initial begin
    int idle = 10, pos = 0, len = 0, start_bx = 0, mbx = 0;
    logic [41:0] fr;
    @(negedge rst);
    forever begin
      @(posedge clk);
      if (bx_en) begin
        mbx++;
        if (len == 0) begin
          if (b_bit == 0) begin
            chk("gap >= 2", idle >= 2);
            chk("frame expected", exp_frame.size() > 0);
            if (exp_frame.size() > 0) begin
              fr  = exp_frame.pop_front();
              len = exp_len.pop_front();
              pos = 1;
              start_bx = mbx;
              if (len == 16 && sync_bx.size() > 0 && fr[41:26] == ref_short(8'h01) && sync_bx[0] == mbx) begin
                void'(sync_bx.pop_front());
                n_sync_ok++;
              end
            end
          end else idle++;
        end else begin
          chk("frame bit", b_bit == fr[41 - pos]);
          pos++;
          if (pos == len) begin
            len  = 0;
            idle = 0;
          end
        end
      end
    end
  end
endmodule
