// ttcvi_sync_timing: orbit source and timing of the synchronous short
// broadcast cycle (bunch counter reset) of the TTCvi.
//
// The orbit is either the external LHC orbit pulse or an internal generator
// with a period of ORBIT_LEN BX (for tests). A counter restarts at each orbit;
// sync_go is asserted in the BX where it equals delay, so the cycle has a fixed
// phase relative to the orbit. holdoff is asserted in the hold_len BX before
// sync_go: the B channel serializer starts no frame then, so the line is free
// when the synchronous cycle must begin. For the window to be complete,
// delay >= hold_len and hold_len >= the longest frame plus the inter-frame gap.
// The programmable phase and the hold-off come from the TTCvi and encoder
// description; the counter widths are this design's choice.
// Timing: all outputs are registered at bx_en and held for one BX.
module ttcvi_sync_timing #(
  parameter int unsigned ORBIT_LEN = ttc_pkg::ORBIT_BX
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bx_en,
  input  logic        ext_orbit,   // one-BX pulse from the LHC
  input  logic        int_orbit,   // 1 = use internal orbit generator
  input  logic        enable,      // sync cycles enabled
  input  logic [11:0] delay,       // BX from orbit to sync cycle
  input  logic [7:0]  hold_len,    // BX of hold-off before the sync cycle
  output logic        orbit,       // selected orbit, one BX pulse
  output logic        sync_go,
  output logic        holdoff
);
  logic [11:0] gen_cnt;
  logic [11:0] since;
  logic        orb_sel;
  logic [12:0] hold_start;

  assign orb_sel    = int_orbit ? (gen_cnt == '0) : ext_orbit;
  assign hold_start = {1'b0, delay} - {5'd0, hold_len};

  always_ff @(posedge clk) begin
    if (rst) begin
      gen_cnt <= '0;
      since   <= 12'hfff;
      orbit   <= 1'b0;
      sync_go <= 1'b0;
      holdoff <= 1'b0;
    end else if (bx_en) begin
      gen_cnt <= (gen_cnt == 12'(ORBIT_LEN - 1)) ? '0 : gen_cnt + 1'b1;
      orbit   <= orb_sel;
      if (orb_sel)              since <= '0;
      else if (since != 12'hfff) since <= since + 1'b1;
      // 'since' below is the count for the BX now being registered
      sync_go <= enable && ((orb_sel ? 12'd0 : since + 1'b1) == delay) && (orb_sel || since != 12'hfff);
      holdoff <= enable && !hold_start[12] &&
                 ({1'b0, (orb_sel ? 12'd0 : since + 1'b1)} >= hold_start) &&
                 ((orb_sel ? 12'd0 : since + 1'b1) < delay) && (orb_sel || since != 12'hfff);
    end
  end
endmodule
