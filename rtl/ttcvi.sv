// ttcvi: TTC-VMEbus interface module. It produces the A channel (one level-1
// accept bit per BX) and the B channel (serial command frames) for the TTC
// encoder.
//
// Blocks: ttcvi_trigger (source selector and emulator), ttcvi_sync_timing
// (orbit and synchronous cycle timing), ttcvi_evcnt (event counter and
// event-number broadcast), two command FIFOs loaded from the bus, and
// ttcvi_bchan (arbiter and serializer). Long cycles from the event-number
// broadcast go before long cycles written from the bus.
//
// The VMEbus slave itself is not modelled: a single-cycle write port (we, addr,
// wdata) stands in for it. Register map (this design's own):
//   0 trigger source select [2:0]       5 sync command byte [7:0]
//   1 emulator rate threshold [15:0]    6 write: queue async short cmd [7:0]
//   2 control: [0] internal orbit,      7 write: queue long cycle: [31] E,
//     [1] event-number broadcast,         [29:16] address, [15:8] subaddress,
//     [2] sync cycles enabled             [7:0] data
//   3 sync delay from orbit [11:0]      8 write: one VME trigger
//   4 hold-off length [7:0]             9 write: reset event counter
// Reset values: source 7 (none), internal orbit, no broadcast, sync enabled,
// sync command 0x01 (bunch counter reset), delay 3500, hold-off 50 BX.
// Timing: a_bit and b_bit change at bx_en; they are taken by the encoder at
// the same edge, so they reach the line one BX after they are produced.
module ttcvi
  import ttc_pkg::*;
#(
  parameter int unsigned N_EXT     = 4,
  parameter int unsigned ORBIT_LEN = ORBIT_BX,
  parameter int unsigned FDEPTH    = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bx_en,
  input  logic             we,
  input  logic [3:0]       addr,
  input  logic [31:0]      wdata,
  input  logic [N_EXT-1:0] ext_trig,
  input  logic             ext_orbit,
  input  logic [7:0]       trig_type,
  output logic             a_bit,      // level-1 accept
  output logic             b_bit,
  output logic             orbit,
  output logic [EV_W-1:0]  ev_num,
  output logic [15:0]      n_inhibited,
  output logic [15:0]      n_dropped,
  output logic [15:0]      n_late
);
  logic [2:0]  r_sel;
  logic [15:0] r_thr;
  logic [2:0]  r_ctrl;
  logic [11:0] r_delay;
  logic [7:0]  r_hold, r_sync_cmd;

  logic        sync_go, holdoff;
  logic        sf_empty, lf_empty, s_take, l_take, ev_take, vl_take;
  logic [7:0]  sf_data;
  long_cmd_t   lf_data, ev_cmd, l_cmd;
  logic        ev_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_sel      <= 3'd7;
      r_thr      <= '0;
      r_ctrl     <= 3'b101;
      r_delay    <= 12'd3500;
      r_hold     <= 8'd50;
      r_sync_cmd <= 8'h01;
    end else if (we) begin
      case (addr)
        4'd0: r_sel      <= wdata[2:0];
        4'd1: r_thr      <= wdata[15:0];
        4'd2: r_ctrl     <= wdata[2:0];
        4'd3: r_delay    <= wdata[11:0];
        4'd4: r_hold     <= wdata[7:0];
        4'd5: r_sync_cmd <= wdata[7:0];
        default: ;
      endcase
    end
  end

  ttcvi_trigger #(.N_EXT(N_EXT)) u_trig (
    .clk, .rst, .bx_en, .ext_trig, .sel(r_sel), .rate_thr(r_thr),
    .shot(we && addr == 4'd8), .l1a(a_bit), .n_inhibited);

  ttcvi_sync_timing #(.ORBIT_LEN(ORBIT_LEN)) u_sync (
    .clk, .rst, .bx_en, .ext_orbit, .int_orbit(r_ctrl[0]), .enable(r_ctrl[2]),
    .delay(r_delay), .hold_len(r_hold), .orbit, .sync_go, .holdoff);

  ttcvi_evcnt u_ev (
    .clk, .rst, .bx_en, .l1a(a_bit), .trig_type, .bcast_en(r_ctrl[1]),
    .ev_reset(we && addr == 4'd9), .ev_num, .cmd(ev_cmd), .cmd_valid(ev_valid),
    .cmd_take(ev_take), .n_dropped);

  ttc_fifo #(.W(8), .DEPTH(FDEPTH)) u_sfifo (
    .clk, .rst, .push(we && addr == 4'd6), .wdata(wdata[7:0]), .pop(s_take),
    .rdata(sf_data), .full(), .empty(sf_empty), .count());

  ttc_fifo #(.W($bits(long_cmd_t)), .DEPTH(FDEPTH)) u_lfifo (
    .clk, .rst, .push(we && addr == 4'd7),
    .wdata({wdata[29:16], wdata[31], wdata[15:8], wdata[7:0]}),
    .pop(vl_take), .rdata(lf_data), .full(), .empty(lf_empty), .count());

  assign l_cmd   = ev_valid ? ev_cmd : lf_data;
  assign ev_take = l_take && ev_valid;
  assign vl_take = l_take && !ev_valid;

  ttcvi_bchan u_bch (
    .clk, .rst, .bx_en, .sync_go, .sync_cmd(r_sync_cmd), .holdoff,
    .s_valid(!sf_empty), .s_cmd(sf_data), .s_take,
    .l_valid(ev_valid || !lf_empty), .l_cmd, .l_take,
    .b_bit, .busy(), .n_late);
endmodule
