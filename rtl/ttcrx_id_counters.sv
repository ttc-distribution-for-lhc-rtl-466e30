// ttcrx_id_counters: bunch counter, event counter and event identifier output
// of the TTCrx.
//
// The 12-bit bunch counter advances every BX and is cleared by the (deskewed)
// bunch counter reset: it reads 0 in the BX after the reset. The 24-bit event
// counter counts accepts and is cleared by the event counter reset; it rolls
// over after 16M events. On an accept the bunch number of that BX is put on the
// 12 shared output lines with bc_str; in the two following BX, during which no
// further accept can occur, the event number of this accept follows as
// event[11:0] with evl_str and event[23:12] with evh_str. The widths and the
// sharing of the 12 lines follow the TTCrx description; the order of the two
// halves is this design's choice. The first accept after a reset is event 1.
// Timing: inputs sampled at bx_en; outputs registered, held one BX.
module ttcrx_id_counters
  import ttc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            bx_en,
  input  logic            l1a,
  input  logic            bc_reset,
  input  logic            ev_reset,
  input  logic            out_en,     // enable the 12-line output
  output logic [BC_W-1:0] bus,
  output logic            bc_str,
  output logic            evl_str,
  output logic            evh_str,
  output logic [BC_W-1:0] bcnt,
  output logic [EV_W-1:0] evcnt
);
  logic [1:0]      seq;      // 1: low half next, 2: high half next
  logic [EV_W-1:0] ev_next;

  always_comb begin
    ev_next = evcnt;
    if (ev_reset) ev_next = '0;
    if (l1a)      ev_next = ev_next + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt    <= '0;
      evcnt   <= '0;
      seq     <= '0;
      bus     <= '0;
      bc_str  <= 1'b0;
      evl_str <= 1'b0;
      evh_str <= 1'b0;
    end else if (bx_en) begin
      bcnt    <= bc_reset ? '0 : bcnt + 1'b1;
      evcnt   <= ev_next;
      bc_str  <= 1'b0;
      evl_str <= 1'b0;
      evh_str <= 1'b0;
      if (l1a && out_en) begin
        bus    <= bcnt;
        bc_str <= 1'b1;
        seq    <= 2'd1;
      end else if (seq == 2'd1) begin
        bus     <= evcnt[BC_W-1:0];
        evl_str <= 1'b1;
        seq     <= 2'd2;
      end else if (seq == 2'd2) begin
        bus     <= evcnt[EV_W-1:BC_W];
        evh_str <= 1'b1;
        seq     <= 2'd0;
      end
    end
  end
endmodule
