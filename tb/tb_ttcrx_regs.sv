// tb_ttcrx_regs: random internal-register writes (E=0), external cycles
// (E=1) and broadcasts are applied; a reference copy of the register file
// and of the expected decoded outputs is compared with the block's outputs
// one BX later. The control register's enables are exercised too. The
// random phase keeps addressed cycles away from subaddress 4; a final phase
// issues read-back requests, spaced as on the real channel, and checks the
// six response words (registers and receiver address) and their timing.
module tb_ttcrx_regs;
  logic clk = 0, rst = 1, bx_en = 0;
  logic ia_valid = 0, ia_e = 0, brc_valid = 0;
  logic [7:0] ia_sub = 0, ia_data = 0, brc_cmd = 0;
  logic [7:0] fine1, fine2, ext_sub, ext_data;
  logic [3:0] coarse1, coarse2, ctrl, user1;
  logic [1:0] user2;
  logic bc_reset, ev_reset, ext_str, rb_str;
  logic [13:0] my_addr = 14'h2a5c;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 0);
    cyc <= cyc + 1;
  end

  ttcrx_regs dut (.*);

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
    logic [7:0] r_f1 = 0, r_f2 = 0, r_c = 0;
    logic [3:0] r_ctl = 4'hf, p_ctl = 4'hf;
    logic       p_ia = 0, p_e = 0, p_brc = 0;
    logic [7:0] p_sub = 0, p_data = 0, p_cmd = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 5000; n++) begin
      do @(posedge clk); while (!bx_en);
      // outputs registered from the inputs of the previous step (p_*)
      chk("fine1", fine1 == r_f1);
      chk("fine2", fine2 == r_f2);
      chk("coarse", {coarse2, coarse1} == r_c);
      chk("ctrl", ctrl == r_ctl);
      chk("bc reset", bc_reset == (p_brc && p_cmd[0]));
      chk("ev reset", ev_reset == (p_brc && p_cmd[1]));
      chk("user1", user1 == ((p_brc && p_ctl[2]) ? p_cmd[5:2] : 4'd0));
      chk("user2", user2 == ((p_brc && p_ctl[2]) ? p_cmd[7:6] : 2'd0));
      chk("ext", ext_str == (p_ia && p_e && p_ctl[3]) &&
                 (!ext_str || (ext_sub == p_sub && ext_data == p_data)));
      // the DUT now takes the inputs set at the previous step, with the
      // control value it holds before any write in this step
      p_ctl = r_ctl;
      if (ia_valid && !ia_e) begin
        case (ia_sub)
          8'd0: r_f1 = ia_data;
          8'd1: r_f2 = ia_data;
          8'd2: r_c = ia_data;
          8'd3: r_ctl = ia_data[3:0];
          default: ;
        endcase
      end
      p_ia = ia_valid; p_e = ia_e; p_sub = ia_sub; p_data = ia_data;
      p_brc = brc_valid; p_cmd = brc_cmd;
      ia_valid  <= ($urandom_range(0, 2) == 0);
      ia_e      <= 1'($urandom);
      ia_sub    <= ($urandom_range(0, 3) == 0) ? 8'($urandom_range(5, 255)) : 8'($urandom_range(0, 3));
      ia_data   <= ($urandom_range(0, 1) == 0) ? 8'hff : 8'($urandom);
      brc_valid <= ($urandom_range(0, 2) == 0);
      brc_cmd   <= 8'($urandom);
      chk("no read-back unless requested", !rb_str);
    end
    // read-back phase
    ia_valid <= 0; brc_valid <= 0;
    for (int r = 0; r < 20; r++) begin
      logic [7:0] expv[6];
      my_addr = 14'($urandom);
      repeat (50) begin do @(posedge clk); while (!bx_en); end
      expv = '{fine1, fine2, {coarse2, coarse1}, {4'd0, ctrl}, my_addr[7:0], {2'd0, my_addr[13:8]}};
      ia_valid <= 1; ia_e <= 0; ia_sub <= 8'd4; ia_data <= 8'($urandom);
      do @(posedge clk); while (!bx_en);
      ia_valid <= 0;
      do @(posedge clk); while (!bx_en);   // request registered
      chk("no response in the request BX", !rb_str);
      for (int k = 0; k < 6; k++) begin
        do @(posedge clk); while (!bx_en);
        chk("read-back strobe", rb_str && !ext_str);
        chk("read-back word", ext_sub == 8'(k) && ext_data == expv[k]);
      end
      do @(posedge clk); while (!bx_en);
      chk("read-back ends after 6 words", !rb_str);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
