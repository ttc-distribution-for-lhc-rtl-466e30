// ttcrx_bframe: B channel frame receiver of the TTCrx.
//
// Between frames the B channel is 1. A 0 starts a frame; the next bit gives
// the format (0 short, 1 long) and the bits that follow are collected until
// the frame is complete (see ttc_pkg for the layout). The frame is then
// checked and corrected by ttc_hamming_dec:
//  - short frame: brc_valid with the 8-bit broadcast command;
//  - long frame addressed to my_addr, or to address 0 (all receivers):
//    ia_valid with E, subaddress and data.
// Frames with an uncorrectable error or a missing stop bit are dropped.
// Corrected single errors and dropped frames are counted (saturating).
// The formats, the 14-bit address and the error correction follow the TTC
// description; the counters and the treatment of address 0 are this design's.
// Timing: inputs are sampled when bx_en is high; outputs are registered and
// held for one BX, starting one BX after the stop bit.
module ttcrx_bframe
  import ttc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              bx_en,
  input  logic              b_bit,
  input  logic              enable,      // decoder locked
  input  logic [ADDR_W-1:0] my_addr,
  output logic              brc_valid,
  output logic [7:0]        brc_cmd,
  output logic              ia_valid,
  output logic              ia_e,
  output logic [7:0]        ia_sub,
  output logic [7:0]        ia_data,
  output logic [7:0]        n_single,
  output logic [7:0]        n_bad
);
  logic        active;
  logic [5:0]  n;             // bits received after the start bit
  logic [39:0] sr;
  logic [40:0] f;             // frame bits after the start bit, incl. this one
  logic        done_s, done_l;
  logic [7:0]  s_q;
  logic        s_single, s_double;
  logic [31:0] l_q;
  logic        l_single, l_double;

  assign f      = {sr[39:0], b_bit};
  assign done_s = active && (n == 6'd14) && !sr[13];   // 15th bit, format 0
  assign done_l = active && (n == 6'd40) && sr[39];    // 41st bit, format 1

  ttc_hamming_dec #(.DW(8)) u_hs (
    .d(f[13:6]), .c(f[5:1]), .q(s_q), .err1(s_single), .err2(s_double));
  ttc_hamming_dec #(.DW(32)) u_hl (
    .d(f[39:8]), .c(f[7:1]), .q(l_q), .err1(l_single), .err2(l_double));

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      n         <= '0;
      sr        <= '0;
      brc_valid <= 1'b0;
      brc_cmd   <= '0;
      ia_valid  <= 1'b0;
      ia_e      <= 1'b0;
      ia_sub    <= '0;
      ia_data   <= '0;
      n_single  <= '0;
      n_bad     <= '0;
    end else if (bx_en) begin
      brc_valid <= 1'b0;
      ia_valid  <= 1'b0;
      if (!enable) begin
        active <= 1'b0;
      end else if (!active) begin
        if (!b_bit) begin
          active <= 1'b1;
          n      <= '0;
          sr     <= '0;
        end
      end else if (done_s || done_l) begin
        active <= 1'b0;
        if (done_s) begin
          if (s_double || !b_bit) begin
            if (n_bad != 8'hff) n_bad <= n_bad + 1'b1;
          end else begin
            if (s_single && n_single != 8'hff) n_single <= n_single + 1'b1;
            brc_valid <= 1'b1;
            brc_cmd   <= s_q;
          end
        end else begin
          if (l_double || !b_bit) begin
            if (n_bad != 8'hff) n_bad <= n_bad + 1'b1;
          end else begin
            if (l_single && n_single != 8'hff) n_single <= n_single + 1'b1;
            if (l_q[31:18] == my_addr || l_q[31:18] == '0) begin
              ia_valid <= 1'b1;
              ia_e     <= l_q[17];
              ia_sub   <= l_q[15:8];
              ia_data  <= l_q[7:0];
            end
          end
        end
      end else begin
        sr <= f[39:0];
        n  <= n + 1'b1;
      end
    end
  end
endmodule
