// tb_ttcsr: the TTCsr board logic fed with TTCrx-style outputs on the
// receiver clock and read by a host on an unrelated 33 MHz clock. Checks that
// the three FIFOs deliver, as 32-bit reads, exactly the words expected for
// the accepts, addressed cycles and broadcasts applied; that the status area
// shows the FIFO counts once the TTC side is idle; and that the host-written
// configuration reaches the receiver address output. Read-back responses are
// mixed in and must land in the broadcast FIFO; one response is made to
// collide with a broadcast and must show in status word 3 as lost.
module tb_ttcsr;
  logic clk = 0, rst = 1, bx_en = 0, rclk = 0, rrst = 1;
  logic [11:0] bus = 0;
  logic bc_str = 0, evl_str = 0, evh_str = 0, ext_str = 0, rb_str = 0, bc_reset = 0, ev_reset = 0;
  logic [7:0] ext_sub = 0, ext_data = 0;
  logic [5:0] brcst = 0;
  logic [13:0] rx_addr, h_cfg_wdata = 0;
  logic [2:0] h_re = 0, h_rvalid;
  logic [31:0] h_rdata [3];
  logic [1:0] h_stat_addr = 0;
  logic [15:0] h_stat;
  logic h_cfg_we = 0;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always #15.15 rclk = ~rclk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcsr #(.DEPTH(256)) dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_w[3][$];

  task automatic next_bx();
    do @(posedge clk); while (!bx_en);
  endtask

  initial begin
    int ev = 0;
    repeat (3) @(posedge clk);
    rst <= 0; rrst <= 0;
    // host writes the configuration
    @(posedge rclk) begin h_cfg_we <= 1; h_cfg_wdata <= 14'h2345; end
    @(posedge rclk) h_cfg_we <= 0;
    repeat (10) @(posedge clk);
    chk("configuration to receiver address", rx_addr == 14'h2345);
    for (int n = 0; n < 300; n++) begin
      next_bx();
      bc_str <= 0; evl_str <= 0; evh_str <= 0; ext_str <= 0; rb_str <= 0;
      bc_reset <= 0; ev_reset <= 0; brcst <= 0;
      case ($urandom_range(0, 7))
        0: begin   // accept: three words in three BX
          ev++;
          bus <= 12'(n); bc_str <= 1; exp_w[0].push_back({4'h1, 12'(n)});
          next_bx(); bc_str <= 0; bus <= 12'(ev); evl_str <= 1; exp_w[0].push_back({4'h2, 12'(ev)});
          next_bx(); evl_str <= 0; bus <= 12'(ev >> 12); evh_str <= 1; exp_w[0].push_back({4'h3, 12'(ev >> 12)});
        end
        1: begin
          ext_str <= 1; ext_sub <= 8'(n); ext_data <= 8'(n * 3);
          exp_w[1].push_back({8'(n), 8'(n * 3)});
        end
        2: begin
          brcst <= 6'(n) | 6'h1; bc_reset <= 1'(n); ev_reset <= 0;
          exp_w[2].push_back({8'h00, 6'(n) | 6'h1, 1'b0, 1'(n)});
        end
        3: begin   // read-back response
          rb_str <= 1; ext_sub <= 8'(n % 6); ext_data <= 8'(n * 5);
          exp_w[2].push_back({4'hf, 4'(n % 6), 8'(n * 5)});
        end
        default: ;
      endcase
    end
    next_bx();
    bc_str <= 0; evl_str <= 0; evh_str <= 0; ext_str <= 0; bc_reset <= 0; brcst <= 0; rb_str <= 0;
    // a response colliding with a broadcast: the broadcast is kept
    next_bx();
    rb_str <= 1; ext_sub <= 8'h01; ext_data <= 8'h55; brcst <= 6'h21;
    exp_w[2].push_back({8'h00, 6'h21, 2'b00});
    next_bx();
    rb_str <= 0; brcst <= 0;
    // pad to even word counts with known words so all can be read in pairs
    for (int k = 1; k < 3; k++)
      if (exp_w[k].size() % 2) begin
        next_bx();
        if (k == 1) begin ext_str <= 1; ext_sub <= 8'hee; ext_data <= 8'hee; end
        else begin brcst <= 6'h3f; end
        exp_w[k].push_back(k == 1 ? 16'heeee : {8'h00, 6'h3f, 2'b00});
        next_bx();
        ext_str <= 0; brcst <= 0;
      end
    if (exp_w[0].size() % 2) begin
      // one more accept gives three more words: even total
      next_bx(); bus <= 12'h7ff; bc_str <= 1; exp_w[0].push_back({4'h1, 12'h7ff});
      next_bx(); bc_str <= 0; bus <= 12'h0; evl_str <= 1; exp_w[0].push_back({4'h2, 12'h0});
      next_bx(); evl_str <= 0; bus <= 12'h0; evh_str <= 1; exp_w[0].push_back({4'h3, 12'h0});
      next_bx(); evh_str <= 0;
    end
    repeat (40) next_bx();
    // status area: counts of the three FIFOs (nothing read yet)
    for (int k = 0; k < 3; k++) begin
      @(posedge rclk) h_stat_addr <= 2'(k);
      @(posedge rclk);
      #1 chk("status count", h_stat == 16'(exp_w[k].size()));
    end
    @(posedge rclk) h_stat_addr <= 2'd3;
    @(posedge rclk);
    #1 chk("lost read-back count in status word 3", h_stat == 16'd1);
    // host reads everything
    for (int k = 0; k < 3; k++) begin
      int guard = 0;
      while (exp_w[k].size() > 0 && guard < 2000) begin
        @(posedge rclk);
        guard++;
        if (h_re[k] && h_rvalid[k]) begin
          logic [15:0] lo, hi;
          lo = exp_w[k].pop_front();
          hi = exp_w[k].pop_front();
          chk("fifo data", h_rdata[k] == {hi, lo});
        end
        h_re <= 3'(h_rvalid[k]) << k;
      end
      @(posedge rclk) h_re <= 0;
      chk("fifo emptied", exp_w[k].size() == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
