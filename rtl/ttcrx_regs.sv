// ttcrx_regs: command processing of the TTCrx.
//
// Long cycles with E=0 load the internal registers (subaddress map is this
// design's own):
//   0 fine deskew 1 [7:0]    (phase of deskewed clock 1, 104 ps steps)
//   1 fine deskew 2 [7:0]
//   2 coarse deskew: [3:0] register 1, [7:4] register 2 (BX)
//   3 control: [0] L1A output, [1] bunch/event number output,
//              [2] broadcast outputs, [3] external subaddress/data output
//   4 read-back request (data ignored)
// A read-back request makes the receiver report its internal parameters and
// its own address so that they can be checked through the data acquisition:
// in the 6 BX that follow, rb_str is high and ext_sub/ext_data carry
// {k, value} for k = 0 fine1, 1 fine2, 2 coarse, 3 control, 4 address[7:0],
// 5 address[13:8] (ext_str stays low). Addressed cycles are at least 44 BX
// apart, so a read-back never overlaps an external cycle. Read-back follows
// the TTCrx description ("internal parameters and the local addresses to be
// read back ... for verification"); the sequence is this design's.
// Long cycles with E=1 are passed out on ext_* for the electronics controller.
// Short broadcasts are split: [0] bunch counter reset, [1] event counter reset,
// [5:2] user commands deskewed with coarse register 1, [7:6] user commands
// deskewed with coarse register 2 (the two registers let some outputs carry
// test signals with a different delay). Register fields and the two coarse
// registers follow the TTCrx description; the bit allocation is this design's.
// Reset: deskews 0, control all enabled.
// Timing: inputs sampled at bx_en; outputs registered, pulses held one BX.
module ttcrx_regs
  import ttc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       bx_en,
  input  logic       ia_valid,
  input  logic       ia_e,
  input  logic [7:0] ia_sub,
  input  logic [7:0] ia_data,
  input  logic       brc_valid,
  input  logic [7:0] brc_cmd,
  output logic [7:0] fine1,
  output logic [7:0] fine2,
  output logic [3:0] coarse1,
  output logic [3:0] coarse2,
  output logic [3:0] ctrl,
  output logic       bc_reset,
  output logic       ev_reset,
  output logic [3:0] user1,
  output logic [1:0] user2,
  input  logic [ADDR_W-1:0] my_addr,
  output logic       rb_str,
  output logic       ext_str,
  output logic [7:0] ext_sub,
  output logic [7:0] ext_data
);
  logic       rb_on;
  logic [2:0] rb_k;
  logic [7:0] rb_val;

  always_comb begin
    unique case (rb_k)
      3'd0:    rb_val = fine1;
      3'd1:    rb_val = fine2;
      3'd2:    rb_val = {coarse2, coarse1};
      3'd3:    rb_val = {4'd0, ctrl};
      3'd4:    rb_val = my_addr[7:0];
      default: rb_val = 8'(my_addr[ADDR_W-1:8]);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rb_on    <= 1'b0;
      rb_k     <= '0;
      rb_str   <= 1'b0;
      fine1    <= '0;
      fine2    <= '0;
      coarse1  <= '0;
      coarse2  <= '0;
      ctrl     <= 4'hf;
      bc_reset <= 1'b0;
      ev_reset <= 1'b0;
      user1    <= '0;
      user2    <= '0;
      ext_str  <= 1'b0;
      ext_sub  <= '0;
      ext_data <= '0;
    end else if (bx_en) begin
      bc_reset <= brc_valid && brc_cmd[0];
      ev_reset <= brc_valid && brc_cmd[1];
      user1    <= (brc_valid && ctrl[2]) ? brc_cmd[5:2] : 4'd0;
      user2    <= (brc_valid && ctrl[2]) ? brc_cmd[7:6] : 2'd0;
      ext_str  <= 1'b0;
      rb_str   <= 1'b0;
      if (rb_on) begin
        rb_str   <= 1'b1;
        ext_sub  <= 8'(rb_k);
        ext_data <= rb_val;
        rb_k     <= rb_k + 1'b1;
        if (rb_k == 3'd5) rb_on <= 1'b0;
      end
      if (ia_valid && !ia_e) begin
        case (ia_sub)
          8'd0: fine1 <= ia_data;
          8'd1: fine2 <= ia_data;
          8'd2: {coarse2, coarse1} <= ia_data;
          8'd3: ctrl <= ia_data[3:0];
          8'd4: begin rb_on <= 1'b1; rb_k <= '0; end
          default: ;
        endcase
      end
      if (ia_valid && ia_e && ctrl[3]) begin
        ext_str  <= 1'b1;
        ext_sub  <= ia_sub;
        ext_data <= ia_data;
      end
    end
  end
endmodule
