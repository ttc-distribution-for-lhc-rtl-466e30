// ttc_pkg: constants and types shared by the TTC transmitter (TTCvi, encoder),
// the TTCrx receiver and the TTCsr board.
//
// The B channel carries two frame formats, sent most significant bit first,
// with the line idle at 1 between frames:
//   short (16 bits): 0, 0, cmd[7:0], ham[4:0], 1
//   long  (42 bits): 0, 1, addr[13:0], E, 1, sub[7:0], data[7:0], ham[6:0], 1
// The check bits are an extended Hamming (SEC-DED) code over the 8 command bits
// of a short frame and over the 32 bits {addr, E, 1, sub, data} of a long frame.
// The field widths (14-bit receiver address, 8-bit subaddress) follow the
// addressing scheme of 16K receivers with 256 subaddresses each; the exact bit
// order of the frames is this design's choice.
package ttc_pkg;

  localparam int unsigned BC_W        = 12;   // bunch counter width
  localparam int unsigned EV_W        = 24;   // event counter width
  localparam int unsigned ADDR_W      = 14;   // TTCrx address width
  localparam int unsigned ORBIT_BX    = 3564; // LHC bunch spacings per orbit
  localparam int unsigned SHORT_LEN   = 16;   // bits in a short frame
  localparam int unsigned LONG_LEN    = 42;   // bits in a long frame
  localparam int unsigned SHORT_HAM   = 5;    // check bits, short frame
  localparam int unsigned LONG_HAM    = 7;    // check bits, long frame
  localparam int unsigned FINE_STEPS  = 240;  // 25 ns / 104 ps fine deskew steps

  // One individually-addressed (or long-format broadcast) cycle.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;   // 0 = all receivers
    logic              e;      // 1 = external subaddress, 0 = TTCrx internal register
    logic [7:0]        sub;
    logic [7:0]        data;
  } long_cmd_t;

  // Number of Hamming check bits (without overall parity) for dw data bits.
  function automatic int unsigned ham_r(int unsigned dw);
    int unsigned r = 1;
    while ((1 << r) < dw + r + 1) r++;
    return r;
  endfunction

  // 32 bits protected by the long-frame check bits.
  function automatic logic [31:0] long_payload(long_cmd_t c);
    return {c.addr, c.e, 1'b1, c.sub, c.data};
  endfunction

endpackage
