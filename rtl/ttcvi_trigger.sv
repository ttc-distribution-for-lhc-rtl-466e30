// ttcvi_trigger: level-1 accept source selector and trigger emulator of the
// TTCvi.
//
// Each bunch crossing (bx_en) one source is sampled according to sel:
//   0..N_EXT-1  external trigger input sel
//   4           internal emulator: a 23-bit LFSR (x^23 + x^18 + 1), advanced
//               16 steps per BX so that successive samples are nearly
//               independent, fires when its low 16 bits are below rate_thr,
//               i.e. with probability rate_thr/65536 per BX
//   5           one trigger per single-shot request (shot, held until sent)
//   others      no triggers
// Any trigger that falls in the two BX after an accept is suppressed and
// counted in n_inhibited: the central trigger never issues accepts there, and
// the TTCrx uses those two BX to output the event number. The selector,
// emulator and inhibit follow the TTCvi description; the LFSR and the source
// encoding are this design's choice.
// Timing: l1a is registered at bx_en and held for one BX.
module ttcvi_trigger #(
  parameter int unsigned N_EXT = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bx_en,
  input  logic [N_EXT-1:0] ext_trig,
  input  logic [2:0]       sel,
  input  logic [15:0]      rate_thr,
  input  logic             shot,        // single-cycle request for one trigger
  output logic             l1a,
  output logic [15:0]      n_inhibited
);
  logic [22:0] lfsr;
  logic [1:0]  inh;       // BX left in the inhibit window
  logic        shot_pend;
  logic        cand;

  function automatic logic [22:0] lfsr_step16(logic [22:0] v);
    for (int i = 0; i < 16; i++) v = {v[21:0], v[22] ^ v[17]};
    return v;
  endfunction

  always_comb begin
    cand = 1'b0;
    for (int i = 0; i < int'(N_EXT); i++)
      if (int'(sel) == i) cand = ext_trig[i];
    if (sel == 3'd4)        cand = (lfsr[15:0] < rate_thr);
    else if (sel == 3'd5)        cand = shot_pend;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr        <= 23'h1;
      inh         <= '0;
      shot_pend   <= 1'b0;
      l1a         <= 1'b0;
      n_inhibited <= '0;
    end else begin
      if (shot) shot_pend <= 1'b1;
      if (bx_en) begin
        lfsr <= lfsr_step16(lfsr);
        l1a  <= 1'b0;
        if (inh != 0) begin
          inh <= inh - 1'b1;
          if (cand) n_inhibited <= n_inhibited + 1'b1;
        end else if (cand) begin
          l1a <= 1'b1;
          inh <= 2'd2;
          if (sel == 3'd5) shot_pend <= shot;
        end
      end
    end
  end
endmodule
