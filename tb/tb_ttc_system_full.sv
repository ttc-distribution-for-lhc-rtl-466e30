// tb_ttc_system_full: end-to-end test of ttc_system at its full size (1024
// receivers on one transmitter, 3564-BX orbit, the module's own parameter
// values). It runs one complete operation: lock of every receiver, event
// counter reset, deskew of four receivers, synchronous bunch counter reset
// at the programmed orbit delay, two external accepts, and checks that every
// receiver reports the same bunch and event numbers as expected from the
// transmitter side. Steps and checks are in tb_ttc_system_body.svh; the
// emulator burst is left out here to keep the run short.
module tb_ttc_system_full;
  import ttc_pkg::*;
  localparam int N = 1024, ORB = ORBIT_BX;
  localparam bit PROGRAM_ALL = 0, BURST = 0;
  localparam int N_EXT_ACC = 2;

  ttc_system dut (.*);

  `include "tb_ttc_system_body.svh"
endmodule
