// tb_ttcrx_bframe: sends reference short and long frames, with random idle
// gaps, random addresses (own, broadcast 0, other) and injected single or
// double bit errors, and checks what the frame receiver reports: the
// broadcast command or the addressed cycle (only for own or broadcast
// address), corrected single errors, dropped double errors, and the
// counters, each result one BX after the stop bit.
module tb_ttcrx_bframe;
  import ttc_pkg::*;
  `include "tb_ttc_ref.svh"
  logic clk = 0, rst = 1, bx_en = 0, b_bit = 1;
  logic [13:0] my_addr = 14'h0abc;
  logic brc_valid, ia_valid, ia_e;
  logic [7:0] brc_cmd, ia_sub, ia_data, n_single, n_bad;
  int checks = 0, failures = 0, cyc = 0;
  always #3.119 clk = ~clk;
  always @(posedge clk) begin
    bx_en <= (cyc % 4 == 1);
    cyc <= cyc + 1;
  end

  ttcrx_bframe dut (.clk, .rst, .bx_en, .b_bit, .enable(1'b1), .my_addr,
    .brc_valid, .brc_cmd, .ia_valid, .ia_e, .ia_sub, .ia_data, .n_single, .n_bad);

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

  task automatic next_bx();
    do @(posedge clk); while (!bx_en);
  endtask

  initial begin
    int exp_single = 0, exp_bad = 0;
    logic [41:0] fr;
    int len, nerr, b1, b2;
    logic is_long;
    logic [13:0] addr; logic e; logic [7:0] sub, data, cmd;
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      is_long = 1'($urandom);
      cmd = 8'($urandom); sub = 8'($urandom); data = 8'($urandom); e = 1'($urandom);
      case ($urandom_range(0, 2))
        0: addr = my_addr;
        1: addr = 14'd0;
        default: addr = 14'($urandom) | 14'h2000;
      endcase
      if (is_long) begin fr = ref_long(addr, e, sub, data); len = 42; end
      else         begin fr = {ref_short(cmd), 26'd0}; len = 16; end
      // errors inside the frame, never in the start, format or stop bits
      nerr = ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 2)) : 0;
      b1 = $urandom_range(2, len - 2);
      do b2 = $urandom_range(2, len - 2); while (b2 == b1);
      if (nerr >= 1) fr[41 - b1] ^= 1'b1;
      if (nerr == 2) fr[41 - b2] ^= 1'b1;
      repeat ($urandom_range(1, 4)) begin next_bx(); b_bit <= 1; end
      for (int i = 0; i < len; i++) begin next_bx(); b_bit <= fr[41 - i]; end
      next_bx(); b_bit <= 1;
      // outputs registered at the bx_en that took the stop bit
      next_bx();
      if (nerr == 2) begin
        exp_bad++;
        chk("double dropped", !brc_valid && !ia_valid);
      end else begin
        if (nerr == 1) exp_single++;
        if (!is_long) chk("broadcast", brc_valid && brc_cmd == cmd && !ia_valid);
        else if (addr == my_addr || addr == 0)
          chk("addressed", ia_valid && ia_e == e && ia_sub == sub && ia_data == data && !brc_valid);
        else chk("other address ignored", !ia_valid && !brc_valid);
      end
      chk("single count", n_single == 8'(exp_single));
      chk("bad count", n_bad == 8'(exp_bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
