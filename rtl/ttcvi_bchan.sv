// ttcvi_bchan: B channel arbiter and serializer of the TTCvi.
//
// Frames (see ttc_pkg) are shifted out one bit per BX, most significant bit
// first, with the line at 1 when idle. A new frame may start only after at
// least GAP idle bits. Priority, highest first:
//   1. the synchronous short cycle, started exactly in the BX where sync_go is
//      high (sync_cmd, normally the bunch counter reset);
//   2. asynchronous short broadcasts (s_*);
//   3. long-format cycles (l_*), broadcast or individually addressed.
// While holdoff is high no frame of class 2 or 3 is started, so the line is
// idle when the synchronous cycle is due. Should a frame still be running at
// sync_go (hold-off set too short), the sync frame is sent as soon as the line
// is free and n_late counts the event.
// Check bits are produced by ttc_hamming_enc. The priority of synchronous
// cycles and the hold-off follow the TTC description; the frame layout and the
// gap are this design's choice.
// Interface: s_take / l_take pulse for one clock when a command is taken.
// Timing: b_bit is registered at bx_en and held for one BX.
module ttcvi_bchan
  import ttc_pkg::*;
#(
  parameter int unsigned GAP = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bx_en,
  input  logic       sync_go,
  input  logic [7:0] sync_cmd,
  input  logic       holdoff,
  input  logic       s_valid,
  input  logic [7:0] s_cmd,
  output logic       s_take,
  input  logic       l_valid,
  input  long_cmd_t  l_cmd,
  output logic       l_take,
  output logic       b_bit,
  output logic       busy,
  output logic [15:0] n_late
);
  logic [LONG_LEN-1:0]  sh;        // remaining frame bits, MSB next
  logic [5:0]           left;      // bits still to send
  logic [3:0]           gap_cnt;   // idle bits since last frame
  logic                 sync_pend;
  logic [SHORT_HAM-1:0] hs_sync, hs_async;
  logic [LONG_HAM-1:0]  hl;
  logic                 can_start;

  ttc_hamming_enc #(.DW(8))  u_hs0 (.d(sync_cmd),            .c(hs_sync));
  ttc_hamming_enc #(.DW(8))  u_hs1 (.d(s_cmd),               .c(hs_async));
  ttc_hamming_enc #(.DW(32)) u_hl  (.d(long_payload(l_cmd)), .c(hl));

  assign busy      = (left != 0);
  assign can_start = !busy && (gap_cnt >= 4'(GAP));

  always_comb begin
    s_take = 1'b0;
    l_take = 1'b0;
    if (bx_en && can_start && !(sync_go || sync_pend) && !holdoff) begin
      if (s_valid)      s_take = 1'b1;
      else if (l_valid) l_take = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sh        <= '1;
      left      <= '0;
      gap_cnt   <= 4'(GAP);
      sync_pend <= 1'b0;
      b_bit     <= 1'b1;
      n_late    <= '0;
    end else if (bx_en) begin
      if (can_start && (sync_go || sync_pend)) begin
        sync_pend <= 1'b0;
        b_bit     <= 1'b0;
        sh        <= {1'b0, sync_cmd, hs_sync, 1'b1, {(LONG_LEN-SHORT_LEN+1){1'b1}}};
        left      <= 6'(SHORT_LEN - 1);
      end else if (s_take) begin
        b_bit <= 1'b0;
        sh    <= {1'b0, s_cmd, hs_async, 1'b1, {(LONG_LEN-SHORT_LEN+1){1'b1}}};
        left  <= 6'(SHORT_LEN - 1);
      end else if (l_take) begin
        b_bit <= 1'b0;
        sh    <= {1'b1, l_cmd.addr, l_cmd.e, 1'b1, l_cmd.sub, l_cmd.data, hl, 1'b1, 1'b1};
        left  <= 6'(LONG_LEN - 1);
      end else if (busy) begin
        b_bit   <= sh[LONG_LEN-1];
        sh      <= {sh[LONG_LEN-2:0], 1'b1};
        left    <= left - 1'b1;
        gap_cnt <= '0;
        if (sync_go) begin
          sync_pend <= 1'b1;
          n_late    <= n_late + 1'b1;
        end
      end else begin
        b_bit <= 1'b1;
        if (gap_cnt != 4'hf) gap_cnt <= gap_cnt + 1'b1;
        if (sync_go) sync_pend <= 1'b1;
      end
    end
  end
endmodule
