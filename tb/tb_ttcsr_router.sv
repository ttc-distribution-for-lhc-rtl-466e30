// tb_ttcsr_router: random TTCrx output activity (accept sequences, external
// cycles, broadcasts) with random FIFO counts. Checks for every BX which FIFO
// is written and with which word, that nothing is written outside bx_en, and
// that in BX without data the status area receives the counts of FIFOs
// 0, 1, 2 in turn. Read-back responses (rb_str, never together with an
// external cycle) go to the broadcast FIFO unless a broadcast has the same
// BX, in which case they are counted as lost.
module tb_ttcsr_router;
  logic clk = 0, rst = 1, bx_en = 0;
  logic [11:0] bus = 0;
  logic bc_str = 0, evl_str = 0, evh_str = 0, ext_str = 0, rb_str = 0, bc_reset = 0, ev_reset = 0;
  logic [7:0] n_rb_lost;
  logic [7:0] ext_sub = 0, ext_data = 0;
  logic [5:0] brcst = 0;
  logic [15:0] count0 = 0, count1 = 0, count2 = 0;
  logic [2:0] fifo_we;
  logic [15:0] fifo_wd [3];
  logic stat_we;
  logic [1:0] stat_addr;
  logic [15:0] stat_wd;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcsr_router dut (.*);

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

  initial begin
    int next_stat = 0, seq = 0, lost = 0, n_rb = 0;
    logic any_trig, any_brc;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      #0.5;
      if (!bx_en) begin
        chk("no write outside bx_en", fifo_we == 0 && !stat_we);
        continue;
      end
      any_trig = bc_str || evl_str || evh_str;
      any_brc  = bc_reset || ev_reset || brcst != 0;
      chk("trigger write", fifo_we[0] == any_trig &&
          (!any_trig || fifo_wd[0] == {bc_str ? 4'h1 : evl_str ? 4'h2 : 4'h3, bus}));
      chk("addressed write", fifo_we[1] == ext_str && (!ext_str || fifo_wd[1] == {ext_sub, ext_data}));
      chk("broadcast write", fifo_we[2] == (any_brc || rb_str) &&
          (!any_brc || fifo_wd[2] == {8'h00, brcst, ev_reset, bc_reset}) &&
          (any_brc || !rb_str || fifo_wd[2] == {4'hf, ext_sub[3:0], ext_data}));
      if (rb_str && any_brc) lost++;
      if (rb_str && !any_brc) n_rb++;
      if (!any_trig && !ext_str && !any_brc && !rb_str) begin
        chk("status write", stat_we && stat_addr == 2'(next_stat) &&
            stat_wd == (next_stat == 0 ? count0 : next_stat == 1 ? count1 : count2));
        next_stat = (next_stat + 1) % 3;
      end else chk("no status write", !stat_we);
      // next BX's inputs
      @(posedge clk);
      seq = (seq == 0 && $urandom_range(0, 4) == 0) ? 1 : (seq == 0 || seq == 3) ? 0 : seq + 1;
      bc_str  <= (seq == 1); evl_str <= (seq == 2); evh_str <= (seq == 3);
      bus     <= 12'($urandom);
      begin
        logic e, r;
        e = ($urandom_range(0, 5) == 0);
        r = !e && ($urandom_range(0, 30) == 0);
        ext_str <= e;
        rb_str  <= r;
      end
      ext_sub <= 8'($urandom); ext_data <= 8'($urandom);
      bc_reset <= ($urandom_range(0, 9) == 0);
      ev_reset <= ($urandom_range(0, 9) == 0);
      brcst    <= ($urandom_range(0, 5) == 0) ? 6'($urandom) : 6'd0;
      count0 <= 16'($urandom); count1 <= 16'($urandom); count2 <= 16'($urandom);
    end
    @(posedge clk);
    chk("lost read-back count", int'(n_rb_lost) == (lost > 255 ? 255 : lost));
    chk("read-back responses stored and lost both happened", n_rb > 0 && lost > 0);
    $display("read-back responses stored %0d, lost %0d", n_rb, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
