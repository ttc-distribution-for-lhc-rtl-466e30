// Body shared by the end-to-end testbenches of ttc_system (included inside
// the testbench module after N, ORB, PROGRAM_ALL, BURST and N_EXT_ACC are
// defined).
//
// The optical network is modelled by giving each receiver its own fibre
// delay FD[i] (a whole number of BX plus 0..3 symbols). The test:
//  1. sets the TTCsr configuration (address of receiver 0) and the TTCvi
//     registers (internal orbit, synchronous bunch counter reset ORB-64 BX
//     after each orbit with a 50 BX hold-off, event-number broadcast);
//  2. waits for every receiver to lock, then resets the event counters with
//     an asynchronous broadcast;
//  3. loads each receiver's coarse deskew with an addressed cycle so that
//     fibre delay + deskew is the same for all (PROGRAM_ALL), sends one
//     external addressed cycle to receiver 3 and one user broadcast;
//  4. issues accepts: a burst from the emulator at full rate (trigger
//     inhibit and broadcast queue overflow), then single external accepts;
//  5. checks at every receiver: same bunch and event numbers as expected
//     from the transmitter side, l1a of all receivers within one BX when
//     deskewed, event-number broadcast contents, the addressed cycle only at
//     receiver 3, the read-back of receiver 0 (at the receiver and in the
//     TTCsr broadcast FIFO); and reads the trigger FIFO of the TTCsr.
// Each mechanism is counted and one that never happened is a failure.

  logic clk = 0, rst = 1, rclk = 0, rrst = 1;
  logic vme_we = 0;
  logic [3:0] vme_addr = 0;
  logic [31:0] vme_wdata = 0;
  logic [3:0] ext_trig = 0;
  logic ext_orbit = 0;
  logic [7:0] trig_type = 0;
  logic [23:0] vi_ev_num;
  logic vi_orbit, vi_l1a, tx_line, tx_bx_en;
  logic [15:0] vi_n_inhibited, vi_n_dropped, vi_n_late;
  logic rx_line[N], rx_ready[N], rx_clk40[N], rx_clk_des1[N], rx_clk_des2[N];
  logic rx_l1a[N], rx_bc_str[N], rx_evl_str[N], rx_evh_str[N], rx_bc_reset[N], rx_ev_reset[N], rx_ext_str[N], rx_rb_str[N];
  logic [11:0] rx_bus[N];
  logic [5:0] rx_brcst[N];
  logic [7:0] rx_ext_sub[N], rx_ext_data[N], rx_n_single[N], rx_n_bad[N];
  logic [2:0] sr_re = 0, sr_rvalid;
  logic [31:0] sr_rdata[3];
  logic [1:0] sr_stat_addr = 0;
  logic [15:0] sr_stat;
  logic sr_cfg_we = 0;
  logic [13:0] sr_cfg_wdata = 0;
  int checks = 0, failures = 0;
  always #3.119 clk = ~clk;
  always #15.15 rclk = ~rclk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // fibre delays, in 160 MHz clocks
  localparam int MAXD = 4 * 12 + 4;
  int FD[N];
  int KBX[N];
  logic hist[MAXD];
  initial for (int i = 0; i < N; i++) begin
    KBX[i] = (i * 5) % 11;                 // whole BX of fibre delay
    FD[i]  = 4 * KBX[i] + (i * 3) % 4;     // plus 0..3 symbols
  end
  always @(posedge clk) begin
    hist[0] <= tx_line;
    for (int k = 1; k < MAXD; k++) hist[k] <= hist[k-1];
  end
  always_comb for (int i = 0; i < N; i++) rx_line[i] = hist[FD[i]];

  // transmitter-side bookkeeping, one step per BX of the TTCvi
  int txbx = 0;
  int sync_start[$];
  int acc_bx[$];
  logic [7:0] acc_tt[$];
  int n_holdoff = 0;
  always @(posedge clk) if (tx_bx_en) begin
    txbx <= txbx + 1;
    if (dut.u_vi.sync_go) sync_start.push_back(txbx + 1);
    if (vi_l1a) begin
      acc_bx.push_back(txbx);
      acc_tt.push_back(trig_type);
    end
    if (dut.u_vi.holdoff) n_holdoff++;
  end

  // receiver-side bookkeeping
  int rx_bc[N][$], rx_ev[N][$];
  int first_l1a_cyc[$];
  int last_l1a_cyc[$];
  logic [11:0] lo[N];
  int cyc = 0;
  logic armed = 0;   // bookkeeping starts once every receiver is locked
  int n_rx_bcr = 0, n_ext3 = 0, n_ext_other = 0, n_user = 0, n_evb_ok = 0, n_evb = 0;
  int evb_sub[N];
  int n_rb_other = 0;
  logic [7:0] rb_words[$];
  logic [31:0] evb_word[N];
  logic [31:0] evb_seen[$];
  int l1a_cnt[N];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < N; i++) if (armed && dut.bx_en_rx[i]) begin
      if (rx_bc_str[i]) rx_bc[i].push_back(int'(rx_bus[i]));
      if (rx_evl_str[i]) lo[i] <= rx_bus[i];
      if (rx_evh_str[i]) rx_ev[i].push_back(int'({rx_bus[i], lo[i]}));
      if (rx_l1a[i]) begin
        if (l1a_cnt[i] >= first_l1a_cyc.size()) begin
          first_l1a_cyc.push_back(cyc);
          last_l1a_cyc.push_back(cyc);
        end else begin
          if (cyc < first_l1a_cyc[l1a_cnt[i]]) first_l1a_cyc[l1a_cnt[i]] = cyc;
          if (cyc > last_l1a_cyc[l1a_cnt[i]]) last_l1a_cyc[l1a_cnt[i]] = cyc;
        end
        l1a_cnt[i]++;
      end
      if (i == 1 && rx_bc_reset[i]) n_rx_bcr++;
      if (rx_brcst[i] == 6'b110001) n_user++;
      if (rx_rb_str[i]) begin
        if (i == 0 && int'(rx_ext_sub[i]) == rb_words.size()) rb_words.push_back(rx_ext_data[i]);
        else n_rb_other++;
      end
      if (rx_ext_str[i]) begin
        if (rx_ext_sub[i] == 8'h40) begin
          if (i == 3 && rx_ext_data[i] == 8'h99) n_ext3++; else n_ext_other++;
        end else if (rx_ext_sub[i] < 4) begin
          // event-number broadcast: subaddresses 0..3
          if (int'(rx_ext_sub[i]) == evb_sub[i]) begin
            evb_word[i][8*(3 - evb_sub[i]) +: 8] = rx_ext_data[i];
            evb_sub[i] = (evb_sub[i] + 1) % 4;
            if (evb_sub[i] == 0 && i == N - 1) evb_seen.push_back(evb_word[i]);
            if (evb_sub[i] == 0) n_evb++;
          end else chk("event broadcast order", 0);
        end
      end
    end
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme(int a, logic [31:0] d);
    @(posedge clk) begin vme_we <= 1; vme_addr <= 4'(a); vme_wdata <= d; end
    @(posedge clk) vme_we <= 0;
  endtask
  task automatic bx_wait(int n);
    int t0 = txbx;
    while (txbx < t0 + n) @(posedge clk);
  endtask
  function automatic int rx_address(int i);
    return (i == 0) ? 14'h3000 : i;
  endfunction

  initial begin
    int all_ready, n_acc, bad_bc, bad_ev, n_fifo_ok;
    repeat (4) @(posedge clk);
    rst <= 0; rrst <= 0;
    @(posedge rclk) begin sr_cfg_we <= 1; sr_cfg_wdata <= 14'h3000; end
    @(posedge rclk) sr_cfg_we <= 0;
    vme(3, ORB - 64);
    vme(4, 50);
    vme(2, 32'h7);
    // 1. lock
    bx_wait(300);
    all_ready = 1;
    for (int i = 0; i < N; i++) if (!rx_ready[i]) all_ready = 0;
    chk("all receivers locked", all_ready == 1);
    armed = 1;
    // 2. event counter reset (async short broadcast), user broadcast
    vme(6, 32'h02);
    vme(6, 32'hc4);                  // bits 7:6 = 11, 5:2 = 0001
    // 3. coarse deskew: fibre BX + deskew = 11 for everybody
    for (int i = 0; i < N; i++)
      if (PROGRAM_ALL || i < 4) vme(7, {1'b0, 1'b0, 14'(rx_address(i)), 8'd2, 8'(11 - KBX[i])});
    vme(7, {1'b1, 1'b0, 14'd3, 8'h40, 8'h99});
    vme(7, {1'b0, 1'b0, 14'h3000, 8'd4, 8'h00});   // read-back of receiver 0
    // the new deskew takes effect for bunch numbering at the next sync reset
    bx_wait((PROGRAM_ALL ? N * 44 + 200 : 400) + ORB);
    // 4. accepts: a burst from the emulator ...
    if (BURST) begin
      vme(1, 65535);
      vme(0, 4);
      bx_wait(60);
      vme(0, 7);
      bx_wait(16 * 180);
    end
    // ... then single external accepts, well apart
    vme(0, 0);
    for (int k = 0; k < N_EXT_ACC; k++) begin
      @(posedge clk) while (!tx_bx_en) @(posedge clk);
      ext_trig[0] <= 1; trig_type <= 8'(k * 37 + 5);
      @(posedge clk) while (!tx_bx_en) @(posedge clk);
      ext_trig[0] <= 0;
      bx_wait(200 + k * 13);
    end
    bx_wait(400);
    // 5. checks
    n_acc = acc_bx.size();
    chk("accepts issued", n_acc > 0);
    bad_bc = 0; bad_ev = 0;
    for (int i = 0; i < N; i++) begin
      chk("accepts received", rx_bc[i].size() == n_acc && rx_ev[i].size() == n_acc);
      if (rx_bc[i].size() != n_acc || rx_ev[i].size() != n_acc)
        $display("rx %0d: %0d bunch numbers, %0d event numbers, %0d accepts", i, rx_bc[i].size(), rx_ev[i].size(), n_acc);
      for (int a = 0; a < n_acc && a < rx_bc[i].size() && a < rx_ev[i].size(); a++) begin
        int ts, exp_bc;
        ts = -1;
        foreach (sync_start[s]) if (sync_start[s] + 18 <= acc_bx[a]) ts = sync_start[s];
        exp_bc = (ts < 0) ? -1 : (acc_bx[a] - ts - 18) % 4096;
        if (ts >= 0 && rx_bc[i][a] != exp_bc) begin
          bad_bc++;
          if (bad_bc < 5) $display("rx %0d accept %0d at %0d: bunch %0d expected %0d", i, a, acc_bx[a], rx_bc[i][a], exp_bc);
        end
        if (rx_ev[i][a] != a + 1) begin
          bad_ev++;
          if (bad_ev < 5) $display("rx %0d accept %0d: event %0d expected %0d", i, a, rx_ev[i][a], a + 1);
        end
      end
    end
    chk("bunch numbers", bad_bc == 0);
    chk("event numbers", bad_ev == 0);
    if (PROGRAM_ALL)
      for (int a = 0; a < first_l1a_cyc.size(); a++)
        chk("accept aligned at all receivers within 1 BX", last_l1a_cyc[a] - first_l1a_cyc[a] < 4);
    // event-number broadcasts seen at the last receiver match the accepts
    n_evb_ok = 0;
    for (int e = 0; e < evb_seen.size(); e++) begin
      int evn;
      evn = int'(evb_seen[e][23:0]);
      if (evn >= 1 && evn <= n_acc && evb_seen[e][31:24] == acc_tt[evn - 1]) n_evb_ok++;
    end
    chk("event broadcasts match accepts", n_evb_ok == evb_seen.size());
    chk("dropped broadcasts accounted", evb_seen.size() + int'(vi_n_dropped) == n_acc);
    // TTCsr: trigger FIFO of receiver 0
    n_fifo_ok = 0;
    for (int a = 0; a < n_acc / 2 * 0 + (3 * n_acc) / 2; a++) begin
      logic [31:0] w;
      int guard = 0;
      @(posedge rclk);
      while (!sr_rvalid[0] && guard < 100) begin @(posedge rclk); guard++; end
      w = sr_rdata[0];
      sr_re <= 3'b001;
      @(posedge rclk) sr_re <= 0;
      for (int h = 0; h < 2; h++) begin
        int widx, acc, part;
        logic [15:0] x;
        x = h ? w[31:16] : w[15:0];
        widx = 2 * a + h;
        acc = widx / 3; part = widx % 3;
        if (acc < rx_bc[0].size()) begin
          if (part == 0 && x == {4'h1, 12'(rx_bc[0][acc])}) n_fifo_ok++;
          if (part == 1 && x == {4'h2, 12'(rx_ev[0][acc])}) n_fifo_ok++;
          if (part == 2 && x == {4'h3, 12'(rx_ev[0][acc] >> 12)}) n_fifo_ok++;
        end
      end
    end
    chk("TTCsr trigger FIFO words", n_fifo_ok == 3 * (n_acc - n_acc % 2));
    // TTCsr broadcast FIFO: the six read-back responses of receiver 0
    begin
      logic [15:0] resp[$];
      logic [15:0] expr[6];
      int idle = 0;
      expr = '{16'hf000, 16'hf100, {8'hf2, 8'(11 - KBX[0])}, 16'hf30f, 16'hf400, 16'hf530};
      while (idle < 50) begin
        @(posedge rclk);
        if (sr_rvalid[2]) begin
          idle = 0;
          if (sr_rdata[2][15:12] == 4'hf) resp.push_back(sr_rdata[2][15:0]);
          if (sr_rdata[2][31:28] == 4'hf) resp.push_back(sr_rdata[2][31:16]);
          sr_re <= 3'b100;
          @(posedge rclk) sr_re <= 0;
        end else idle++;
      end
      chk("read-back words at receiver 0", rb_words.size() == 6 && n_rb_other == 0);
      chk("read-back responses in the TTCsr broadcast FIFO", resp.size() == 6);
      if (resp.size() == 6)
        for (int k = 0; k < 6; k++) chk("read-back response value", resp[k] == expr[k]);
    end
    // mechanisms
    chk("mechanism: synchronous bunch counter resets", n_rx_bcr > 0 && sync_start.size() > 0);
    chk("mechanism: hold-off before sync cycle", n_holdoff > 0);
    chk("mechanism: addressed cycle only at its receiver", n_ext3 == 1 && n_ext_other == 0);
    chk("mechanism: user broadcast at every receiver", n_user == N);
    chk("mechanism: event-number broadcast", n_evb > 0);
    chk("mechanism: read-back", rb_words.size() > 0);
    chk("mechanism: no sync cycle late", vi_n_late == 0);
    if (BURST) begin
      chk("mechanism: trigger inhibit", vi_n_inhibited > 0);
      chk("mechanism: broadcast queue overflow", vi_n_dropped > 0);
    end
    $display("receivers %0d, accepts %0d, sync cycles %0d, hold-off BX %0d, event broadcasts %0d, dropped %0d, inhibited %0d",
             N, n_acc, sync_start.size(), n_holdoff, n_evb, vi_n_dropped, vi_n_inhibited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
