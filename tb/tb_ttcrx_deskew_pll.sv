// tb_ttcrx_deskew_pll: checks the delay of the behavioural fine deskew model
// for a set of tap pairs: measured rising-edge delay against
// (tap16*25000/16 + tap15*25000/15) mod 25000 ps, within 1 ps.
module tb_ttcrx_deskew_pll;
  logic       clk_in = 0;
  logic [3:0] tap16, tap15;
  logic       clk_out;
  int checks = 0, failures = 0;

  ttcrx_deskew_pll dut (.clk_in, .tap16, .tap15, .clk_out);

  always #12500ps clk_in = ~clk_in;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_in, t_out;
    real exp_d, got;
    for (int k = 0; k < 40; k++) begin
      tap16 = 4'($urandom_range(0, 15));
      tap15 = 4'($urandom_range(0, 14));
      exp_d = real'(((tap16 * 25000) / 16 + (tap15 * 25000) / 15) % 25000);
      @(posedge clk_in); @(posedge clk_in);
      t_in = $realtime;
      @(posedge clk_out);
      t_out = $realtime;
      got = (t_out - t_in) / 1ps;   // in ps whatever the time unit
      if (exp_d == 0.0 && got >= 25000.0) got = got - 25000.0;
      checks++;
      if (got + 1.0 < exp_d || got > exp_d + 1.0) begin
        failures++;
        $display("FAIL tap16=%0d tap15=%0d delay=%0.1f exp=%0.1f", tap16, tap15, got, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
