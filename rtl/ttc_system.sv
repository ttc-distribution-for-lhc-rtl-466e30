// ttc_system: one TTC distribution zone: the TTCvi and the encoder at the
// transmitter, N_RX TTCrx timing receivers at the far ends of the passive
// optical tree, and a TTCsr board reading receiver 0.
//
// Path of a signal: the TTCvi issues a level-1 accept (A channel) or a B
// channel frame in some BX; ttc_encoder time-multiplexes both channels into
// four biphase-mark symbols of 6.24 ns per BX on tx_line. The laser, fibres,
// tree couplers and photodiodes are outside this logic: tx_line leaves as a
// port and each receiver's received signal enters on rx_line[i], delayed by
// its own unknown fibre length. Each TTCrx recovers the phase, decodes
// commands addressed to it or broadcast, and outputs the accept, bunch and
// event numbers and commands, delayed by its own coarse and fine deskew.
// Receiver 0 takes its address from the TTCsr configuration register;
// receiver i > 0 has the fixed address i, standing for its configuration PROM.
// N_RX defaults to 1024, the fanout of one transmitter through two levels of
// 1:32 couplers; the addressing allows up to 16K receivers per zone.
// Clocks: clk is the 160.32 MHz symbol clock; the receivers are modelled as
// running on the same clock, each finding its own symbol and BX phase. rclk is
// the TTCsr host clock.
module ttc_system
  import ttc_pkg::*;
#(
  parameter int unsigned N_RX      = 1024,
  parameter int unsigned ORBIT_LEN = ORBIT_BX
) (
  input  logic              clk,
  input  logic              rst,
  // TTCvi register port and front-panel inputs
  input  logic              vme_we,
  input  logic [3:0]        vme_addr,
  input  logic [31:0]       vme_wdata,
  input  logic [3:0]        ext_trig,
  input  logic              ext_orbit,
  input  logic [7:0]        trig_type,
  output logic [EV_W-1:0]   vi_ev_num,
  output logic              vi_orbit,
  output logic              vi_l1a,
  output logic [15:0]       vi_n_inhibited,
  output logic [15:0]       vi_n_dropped,
  output logic [15:0]       vi_n_late,
  // optical network
  output logic              tx_line,
  output logic              tx_bx_en,
  input  logic              rx_line    [N_RX],
  // receiver outputs
  output logic              rx_ready   [N_RX],
  output logic              rx_clk40   [N_RX],
  output logic              rx_clk_des1[N_RX],
  output logic              rx_clk_des2[N_RX],
  output logic              rx_l1a     [N_RX],
  output logic [BC_W-1:0]   rx_bus     [N_RX],
  output logic              rx_bc_str  [N_RX],
  output logic              rx_evl_str [N_RX],
  output logic              rx_evh_str [N_RX],
  output logic              rx_bc_reset[N_RX],
  output logic              rx_ev_reset[N_RX],
  output logic [5:0]        rx_brcst   [N_RX],
  output logic              rx_rb_str  [N_RX],
  output logic              rx_ext_str [N_RX],
  output logic [7:0]        rx_ext_sub [N_RX],
  output logic [7:0]        rx_ext_data[N_RX],
  output logic [7:0]        rx_n_single[N_RX],
  output logic [7:0]        rx_n_bad   [N_RX],
  // TTCsr host port
  input  logic              rclk,
  input  logic              rrst,
  input  logic [2:0]        sr_re,
  output logic [31:0]       sr_rdata [3],
  output logic [2:0]        sr_rvalid,
  input  logic [1:0]        sr_stat_addr,
  output logic [15:0]       sr_stat,
  input  logic              sr_cfg_we,
  input  logic [ADDR_W-1:0] sr_cfg_wdata
);
  logic              a_bit, b_bit, bx_en;
  logic [ADDR_W-1:0] addr0;
  logic              bx_en_rx [N_RX];

  assign tx_bx_en = bx_en;
  assign vi_l1a   = a_bit;

  ttcvi #(.ORBIT_LEN(ORBIT_LEN)) u_vi (
    .clk, .rst, .bx_en, .we(vme_we), .addr(vme_addr), .wdata(vme_wdata),
    .ext_trig, .ext_orbit, .trig_type, .a_bit, .b_bit, .orbit(vi_orbit),
    .ev_num(vi_ev_num), .n_inhibited(vi_n_inhibited), .n_dropped(vi_n_dropped),
    .n_late(vi_n_late));

  ttc_encoder u_enc (.clk, .rst, .a(a_bit), .b(b_bit), .bx_en, .line(tx_line));

  for (genvar i = 0; i < int'(N_RX); i++) begin : g_rx
    ttcrx u_rx (
      .clk, .rst, .line(rx_line[i]),
      .my_addr(i == 0 ? addr0 : ADDR_W'(i)),
      .ready(rx_ready[i]), .bx_en(bx_en_rx[i]), .clk40(rx_clk40[i]),
      .clk40_des1(rx_clk_des1[i]), .clk40_des2(rx_clk_des2[i]),
      .l1a(rx_l1a[i]), .bcnt_bus(rx_bus[i]), .bc_str(rx_bc_str[i]),
      .evl_str(rx_evl_str[i]), .evh_str(rx_evh_str[i]),
      .bc_reset(rx_bc_reset[i]), .ev_reset(rx_ev_reset[i]),
      .brcst(rx_brcst[i]), .rb_str(rx_rb_str[i]), .ext_str(rx_ext_str[i]), .ext_sub(rx_ext_sub[i]),
      .ext_data(rx_ext_data[i]), .n_single(rx_n_single[i]), .n_bad(rx_n_bad[i]));
  end

  ttcsr u_sr (
    .clk, .rst, .bx_en(bx_en_rx[0]), .bus(rx_bus[0]), .bc_str(rx_bc_str[0]),
    .evl_str(rx_evl_str[0]), .evh_str(rx_evh_str[0]), .rb_str(rx_rb_str[0]), .ext_str(rx_ext_str[0]),
    .ext_sub(rx_ext_sub[0]), .ext_data(rx_ext_data[0]),
    .bc_reset(rx_bc_reset[0]), .ev_reset(rx_ev_reset[0]), .brcst(rx_brcst[0]),
    .rx_addr(addr0), .rclk, .rrst, .h_re(sr_re), .h_rdata(sr_rdata),
    .h_rvalid(sr_rvalid), .h_stat_addr(sr_stat_addr), .h_stat(sr_stat),
    .h_cfg_we(sr_cfg_we), .h_cfg_wdata(sr_cfg_wdata));
endmodule
