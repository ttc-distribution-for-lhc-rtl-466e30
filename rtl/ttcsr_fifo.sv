// ttcsr_fifo: dual-clock FIFO of the TTCsr board, held in a dual-port memory.
//
// The TTC side writes 16-bit words at up to one per BX (wclk with we for one
// clock); the host side reads 32-bit words, {later word, earlier word}, each
// taking two 16-bit entries, as the memories of the board are written 16 bits
// wide at 40 MHz and read 32 bits wide at 33 MHz. Write and read pointers are
// passed between the clock domains in Gray code through two-flop
// synchronizers, so counts seen on either side are conservative.
// rvalid says that at least two words are present; rdata is valid with it and
// re (one rclk) removes them. Writes into a full FIFO are dropped and
// counted. Depth (words) is this design's choice.
module ttcsr_fifo #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     wclk,
  input  logic                     wrst,
  input  logic                     we,
  input  logic [15:0]              wdata,
  output logic                     wfull,
  output logic [$clog2(DEPTH):0]   wcount,
  output logic [15:0]              n_lost,
  input  logic                     rclk,
  input  logic                     rrst,
  input  logic                     re,
  output logic [31:0]              rdata,
  output logic                     rvalid,
  output logic [$clog2(DEPTH):0]   rcount
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] g2b(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  assign rbin_w = g2b(rgray_w2);
  assign wcount = wbin - rbin_w;
  assign wfull  = (wcount == (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (we && !wfull) mem[wbin[AW-1:0]] <= wdata;
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      n_lost   <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (we && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
      end else if (we) begin
        n_lost <= n_lost + 1'b1;
      end
    end
  end

  // read side
  assign wbin_r = g2b(wgray_r2);
  assign rcount = wbin_r - rbin;
  assign rvalid = (rcount >= (AW+1)'(2));
  assign rdata  = {mem[AW'(rbin[AW-1:0] + 1'b1)], mem[rbin[AW-1:0]]};

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (re && rvalid) begin
        rbin  <= rbin + (AW+1)'(2);
        rgray <= (rbin + (AW+1)'(2)) ^ ((rbin + (AW+1)'(2)) >> 1);
      end
    end
  end
endmodule
