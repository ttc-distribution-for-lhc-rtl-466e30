// ttcsr_router: routing of TTCrx outputs to the three FIFOs of the TTCsr.
//
// Each BX the router looks at the TTCrx output buses and writes 16-bit words:
//   trigger FIFO    {4'h1, bunch number}, {4'h2, event[11:0]},
//                   {4'h3, event[23:12]}, one per strobe
//   addressed FIFO  {subaddress, data} of each external addressed cycle
//   broadcast FIFO  {8'h00, brcst[5:0], ev_reset, bc_reset} for each BX
//                   with a deskewed broadcast output active, and
//                   {4'hf, k[3:0], value} for each TTCrx read-back response
//                   (rb_str); in the rare BX that has both, the broadcast is
//                   kept and the response is lost (count in n_rb_lost)
// In a BX in which the TTCrx delivers nothing, the router instead writes the
// count of one FIFO (taking them in turn) to the status area. The three FIFOs
// and the idle-cycle status writes follow the TTCsr description; the word
// formats are this design's.
// Timing: inputs are sampled at bx_en; the write strobes are high for the
// clock of bx_en only, so the FIFOs see at most one write per BX.
module ttcsr_router
  import ttc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            bx_en,
  input  logic [BC_W-1:0] bus,
  input  logic            bc_str,
  input  logic            evl_str,
  input  logic            evh_str,
  input  logic            rb_str,
  input  logic            ext_str,
  input  logic [7:0]      ext_sub,
  input  logic [7:0]      ext_data,
  input  logic            bc_reset,
  input  logic            ev_reset,
  input  logic [5:0]      brcst,
  input  logic [15:0]     count0,
  input  logic [15:0]     count1,
  input  logic [15:0]     count2,
  output logic [2:0]      fifo_we,
  output logic [15:0]     fifo_wd [3],
  output logic            stat_we,
  output logic [1:0]      stat_addr,
  output logic [15:0]     stat_wd,
  output logic [7:0]      n_rb_lost
);
  logic [1:0] next_stat;
  logic       any_brc;

  assign any_brc = bc_reset || ev_reset || (brcst != '0);

  always_comb begin
    fifo_we    = '0;
    fifo_wd[0] = '0;
    fifo_wd[1] = {ext_sub, ext_data};
    fifo_wd[2] = any_brc ? {8'h00, brcst, ev_reset, bc_reset}
                         : {4'hf, ext_sub[3:0], ext_data};
    if (bc_str)  fifo_wd[0] = {4'h1, bus};
    if (evl_str) fifo_wd[0] = {4'h2, bus};
    if (evh_str) fifo_wd[0] = {4'h3, bus};
    if (bx_en) begin
      fifo_we[0] = bc_str || evl_str || evh_str;
      fifo_we[1] = ext_str;
      fifo_we[2] = any_brc || rb_str;
    end
    stat_we   = bx_en && (fifo_we == '0);
    stat_addr = next_stat;
    unique case (next_stat)
      2'd0:    stat_wd = count0;
      2'd1:    stat_wd = count1;
      default: stat_wd = count2;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      next_stat <= '0;
      n_rb_lost <= '0;
    end else begin
      if (stat_we) next_stat <= (next_stat == 2'd2) ? 2'd0 : next_stat + 1'b1;
      if (bx_en && rb_str && any_brc && n_rb_lost != 8'hff) n_rb_lost <= n_rb_lost + 1'b1;
    end
  end
endmodule
