// ttcsr: TTC simple receiver board (PMC) logic around one TTCrx.
//
// ttcsr_router sorts the TTCrx outputs into three ttcsr_fifo instances:
// 0 trigger data (bunch and event numbers), 1 subaddress and data of
// addressed cycles, 2 broadcast commands and TTCrx read-back responses. In BX
// without TTCrx data it writes the FIFO counts to a three-word status memory;
// status address 3 gives the count of read-back responses lost to a
// simultaneous broadcast (a slowly changing count taken straight across the
// clock domains: read it twice). A configuration register,
// written from the host, supplies the TTCrx address (the configuration PROM
// function kept in the board FPGA so that it can be changed from the host).
// The PCI slave is not modelled: the host side is a plain synchronous port on
// rclk (33 MHz in the board). Reading a FIFO: h_rvalid[k] high means
// h_rdata[k] holds two words; h_re[k] for one rclk consumes them. h_stat is
// the status word at h_stat_addr, read combinationally.
// The TTC side runs on the receiver clock clk with the BX strobe bx_en.
module ttcsr
  import ttc_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              bx_en,
  input  logic [BC_W-1:0]   bus,
  input  logic              bc_str,
  input  logic              evl_str,
  input  logic              evh_str,
  input  logic              rb_str,
  input  logic              ext_str,
  input  logic [7:0]        ext_sub,
  input  logic [7:0]        ext_data,
  input  logic              bc_reset,
  input  logic              ev_reset,
  input  logic [5:0]        brcst,
  output logic [ADDR_W-1:0] rx_addr,
  input  logic              rclk,
  input  logic              rrst,
  input  logic [2:0]        h_re,
  output logic [31:0]       h_rdata [3],
  output logic [2:0]        h_rvalid,
  input  logic [1:0]        h_stat_addr,
  output logic [15:0]       h_stat,
  input  logic              h_cfg_we,
  input  logic [ADDR_W-1:0] h_cfg_wdata
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic [2:0]        fifo_we;
  logic [15:0]       fifo_wd [3];
  logic [CW-1:0]     wcount [3];
  logic              stat_we;
  logic [1:0]        stat_addr;
  logic [15:0]       stat_wd;
  logic [15:0]       stat_mem [3];
  logic [ADDR_W-1:0] cfg, cfg_s1;
  logic [7:0]        n_rb_lost;

  ttcsr_router u_rt (
    .clk, .rst, .bx_en, .bus, .bc_str, .evl_str, .evh_str, .rb_str, .ext_str, .ext_sub,
    .ext_data, .bc_reset, .ev_reset, .brcst,
    .count0(16'(wcount[0])), .count1(16'(wcount[1])), .count2(16'(wcount[2])),
    .fifo_we, .fifo_wd, .stat_we, .stat_addr, .stat_wd,
    .n_rb_lost);

  for (genvar k = 0; k < 3; k++) begin : g_fifo
    ttcsr_fifo #(.DEPTH(DEPTH)) u_f (
      .wclk(clk), .wrst(rst), .we(fifo_we[k]), .wdata(fifo_wd[k]),
      .wfull(), .wcount(wcount[k]), .n_lost(),
      .rclk, .rrst, .re(h_re[k]), .rdata(h_rdata[k]), .rvalid(h_rvalid[k]),
      .rcount());
  end

  // status words: written on the TTC side, read on the host side
  always_ff @(posedge clk) begin
    if (stat_we && stat_addr != 2'd3) stat_mem[stat_addr] <= stat_wd;
  end
  assign h_stat = (h_stat_addr == 2'd3) ? {8'h00, n_rb_lost} : stat_mem[h_stat_addr];

  // configuration register (host side) and its copy on the TTC side
  always_ff @(posedge rclk) begin
    if (rrst)          cfg <= '0;
    else if (h_cfg_we) cfg <= h_cfg_wdata;
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_s1  <= '0;
      rx_addr <= '0;
    end else begin
      cfg_s1  <= cfg;
      rx_addr <= cfg_s1;
    end
  end
endmodule
