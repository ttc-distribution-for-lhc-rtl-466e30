// tb_ttc_system: end-to-end test of the TTC distribution zone with 12
// receivers and a 600-BX orbit; see tb_ttc_system_body.svh for the steps
// and checks. The mechanisms exercised are those of the TTC system; the
// sizes, fibre delays and accept pattern are this testbench's own.
module tb_ttc_system;
  import ttc_pkg::*;
  localparam int N = 12, ORB = 600;
  localparam bit PROGRAM_ALL = 1, BURST = 1;
  localparam int N_EXT_ACC = 6;

  ttc_system #(.N_RX(N), .ORBIT_LEN(ORB)) dut (.*);

  `include "tb_ttc_system_body.svh"
endmodule
