// ttcrx: digital part of the TTCrx timing receiver, with the behavioural model
// of its fine deskew loops.
//
// Data path: ttcrx_decoder recovers the A bit (level-1 accept) and B bit of
// every BX from the line; ttcrx_bframe turns the B channel into broadcast
// commands and addressed cycles; ttcrx_regs holds the deskew and control
// registers and splits the broadcasts. The accept, the bunch and event counter
// resets and the user broadcasts of register 1 pass through one coarse delay
// (coarse1 BX); the user broadcasts of register 2 through a second one
// (coarse2 BX). The delayed accept and resets drive ttcrx_id_counters, which
// puts bunch and event numbers on the 12 shared lines. fine1 and fine2 select,
// through ttcrx_fine_tapsel, the phases of two deskewed 40 MHz clocks made by
// ttcrx_deskew_pll; clk40 is the clock without deskew. A read-back request
// (internal subaddress 4) makes ttcrx_regs report its registers and the
// receiver address on ext_sub/ext_data, marked by rb_str.
// The recovered 160.32 MHz clock is clk (the analog clock recovery is not
// part of this model). Outputs other than the clocks are registered in clk,
// change once per BX and hold for one BX. Every output stays quiet until the
// decoder has locked.
module ttcrx
  import ttc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              line,
  input  logic [ADDR_W-1:0] my_addr,
  output logic              ready,
  output logic              bx_en,
  output logic              clk40,
  output logic              clk40_des1,
  output logic              clk40_des2,
  output logic              l1a,
  output logic [BC_W-1:0]   bcnt_bus,
  output logic              bc_str,
  output logic              evl_str,
  output logic              evh_str,
  output logic              bc_reset,     // deskewed bunch counter reset
  output logic              ev_reset,     // deskewed event counter reset
  output logic [5:0]        brcst,        // deskewed user broadcasts [7:2]
  output logic              rb_str,       // read-back word on ext_sub/ext_data
  output logic              ext_str,
  output logic [7:0]        ext_sub,
  output logic [7:0]        ext_data,
  output logic [7:0]        n_single,
  output logic [7:0]        n_bad
);
  logic       a_bit, b_bit;
  logic       brc_valid, ia_valid, ia_e;
  logic [7:0] brc_cmd, ia_sub, ia_data;
  logic [7:0] fine1, fine2;
  logic [3:0] coarse1, coarse2, ctrl;
  logic       bc_res_raw, ev_res_raw;
  logic [3:0] user1;
  logic [1:0] user2;
  logic       l1a_raw;
  logic [3:0] t16_1, t15_1, t16_2, t15_2;

  ttcrx_decoder u_dec (
    .clk, .rst, .line, .a_bit, .b_bit, .bx_en, .clk40, .locked(ready));

  ttcrx_bframe u_bf (
    .clk, .rst, .bx_en, .b_bit, .enable(ready), .my_addr,
    .brc_valid, .brc_cmd, .ia_valid, .ia_e, .ia_sub, .ia_data,
    .n_single, .n_bad);

  ttcrx_regs u_regs (
    .clk, .rst, .bx_en, .ia_valid, .ia_e, .ia_sub, .ia_data,
    .brc_valid, .brc_cmd, .fine1, .fine2, .coarse1, .coarse2, .ctrl,
    .bc_reset(bc_res_raw), .ev_reset(ev_res_raw), .user1, .user2,
    .my_addr, .rb_str, .ext_str, .ext_sub, .ext_data);

  assign l1a_raw = a_bit && ready;

  ttcrx_coarse_delay #(.W(7)) u_cd1 (
    .clk, .bx_en, .delay(coarse1),
    .d({l1a_raw, bc_res_raw, ev_res_raw, user1}),
    .q({l1a, bc_reset, ev_reset, brcst[3:0]}));

  ttcrx_coarse_delay #(.W(2)) u_cd2 (
    .clk, .bx_en, .delay(coarse2), .d(user2), .q(brcst[5:4]));

  ttcrx_id_counters u_cnt (
    .clk, .rst, .bx_en, .l1a(l1a && ctrl[0]), .bc_reset, .ev_reset,
    .out_en(ctrl[1]), .bus(bcnt_bus), .bc_str, .evl_str, .evh_str,
    .bcnt(), .evcnt());

  ttcrx_fine_tapsel u_ts1 (.fine(fine1), .tap16(t16_1), .tap15(t15_1));
  ttcrx_fine_tapsel u_ts2 (.fine(fine2), .tap16(t16_2), .tap15(t15_2));

  ttcrx_deskew_pll u_pll1 (.clk_in(clk40), .tap16(t16_1), .tap15(t15_1), .clk_out(clk40_des1));
  ttcrx_deskew_pll u_pll2 (.clk_in(clk40), .tap16(t16_2), .tap15(t15_2), .clk_out(clk40_des2));
endmodule
