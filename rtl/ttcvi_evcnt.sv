// ttcvi_evcnt: TTCvi event counter and event-number broadcast.
//
// A 24-bit counter counts level-1 accepts; ev_num is the number of the last
// accept (the first accept after a reset is event 1). When bcast_en is set,
// every accept queues {trigger type, event number} in a 16-entry FIFO; the
// queue is sent as four long-format broadcast cycles (address 0, E=1,
// subaddresses 0..3 carrying the trigger type, event[23:16], event[15:8] and
// event[7:0]). With 42-bit frames and two idle bits between them one
// broadcast takes 176 BX (4.39 us) when the B channel is free. Accepts that
// find the queue full are not broadcast and are counted in n_dropped.
// The counter and the broadcast of event number and trigger type follow the
// TTCvi description; the split into four cycles and the queue are this
// design's choice.
// Interface: cmd/cmd_valid offer one long cycle; cmd_take (one clock) takes it.
module ttcvi_evcnt
  import ttc_pkg::*;
#(
  parameter int unsigned QDEPTH = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            bx_en,
  input  logic            l1a,        // held for one BX
  input  logic [7:0]      trig_type,
  input  logic            bcast_en,
  input  logic            ev_reset,   // one-clock request: counter to 0
  output logic [EV_W-1:0] ev_num,
  output long_cmd_t       cmd,
  output logic            cmd_valid,
  input  logic            cmd_take,
  output logic [15:0]     n_dropped
);
  logic [31:0] q_rdata;
  logic        q_full, q_empty, q_push, q_pop;
  logic [1:0]  idx;
  logic [$clog2(QDEPTH+1)-1:0] q_count;  // occupancy, for debug visibility

  assign q_push = bx_en && l1a && bcast_en && !q_full;
  assign q_pop  = cmd_take && cmd_valid && (idx == 2'd3);

  ttc_fifo #(.W(32), .DEPTH(QDEPTH)) u_q (
    .clk(clk), .rst(rst), .push(q_push), .wdata({trig_type, ev_num + 24'd1}),
    .pop(q_pop), .rdata(q_rdata), .full(q_full), .empty(q_empty), .count(q_count));

  assign cmd_valid = !q_empty;
  always_comb begin
    cmd.addr = '0;
    cmd.e    = 1'b1;
    cmd.sub  = {6'd0, idx};
    cmd.data = q_rdata[8*(3-int'(idx)) +: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_num    <= '0;
      idx       <= '0;
      n_dropped <= '0;
    end else begin
      if (ev_reset)              ev_num <= '0;
      else if (bx_en && l1a)     ev_num <= ev_num + 1'b1;
      if (bx_en && l1a && bcast_en && q_full) n_dropped <= n_dropped + 1'b1;
      if (cmd_take && cmd_valid) idx <= idx + 1'b1;
    end
  end
endmodule
