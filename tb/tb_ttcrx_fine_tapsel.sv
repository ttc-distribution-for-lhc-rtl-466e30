// tb_ttcrx_fine_tapsel: for every fine deskew value 0..255, the delay
// (15*tap16 + 16*tap15) mod 240, in units of 25 ns / 240, must equal the value
// modulo 240, with tap16 < 16 and tap15 < 15; and the 240 values 0..239 must
// select 240 different tap pairs.
module tb_ttcrx_fine_tapsel;
  logic [7:0] fine;
  logic [3:0] tap16, tap15;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ttcrx_fine_tapsel dut (.fine, .tap16, .tap15);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen[256];
    for (int v = 0; v < 256; v++) begin
      fine = 8'(v);
      #1;
      checks++;
      if (((15 * int'(tap16) + 16 * int'(tap15)) % 240) != v % 240 || tap15 > 14) begin
        failures++;
        $display("FAIL fine=%0d tap16=%0d tap15=%0d", v, tap16, tap15);
      end
      if (v < 240) begin
        checks++;
        if (seen[{tap16, tap15}]) begin failures++; $display("FAIL duplicate pair"); end
        seen[{tap16, tap15}] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
