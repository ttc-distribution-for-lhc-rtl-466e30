// tb_ttcsr_fifo: 16-bit words written on a 40.08 MHz clock at random, read
// as 32-bit pairs on an unrelated 33 MHz clock at random. Every pair read
// must be the next two words written, in order; the FIFO is filled to full
// once (extra writes counted as lost, none read back) and drained.
module tb_ttcsr_fifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic we = 0, re = 0;
  logic [15:0] wdata = 0, n_lost;
  logic wfull, rvalid;
  logic [31:0] rdata;
  logic [6:0] wcount, rcount;
  int checks = 0, failures = 0;
  always #12.475 wclk = ~wclk;
  always #15.15 rclk = ~rclk;

  ttcsr_fifo #(.DEPTH(64)) dut (.*);

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model[$];
  int n_written = 0, lost_exp = 0;
  bit phase_fill = 0, stop_writes = 0;

  initial begin
    repeat (3) @(posedge wclk);
    wrst <= 0;
    for (int n = 0; n < 20000 && !stop_writes; n++) begin
      @(posedge wclk);
      if (we && !wfull) model.push_back(wdata);
      else if (we) lost_exp++;
      we    <= phase_fill ? 1'b1 : ($urandom_range(0, 2) == 0);
      wdata <= 16'($urandom);
    end
    we <= 0;
  end

  initial begin
    logic [15:0] lo, hi;
    repeat (3) @(posedge rclk);
    rrst <= 0;
    for (int n = 0; n < 12000; n++) begin
      @(posedge rclk);
      if (re && rvalid) begin
        checks++;
        lo = model.pop_front();
        hi = model.pop_front();
        if (rdata != {hi, lo}) begin
          failures++;
          $display("FAIL read %h expected %h", rdata, {hi, lo});
        end
      end
      // in the middle, stop reading so the FIFO fills up
      phase_fill = (n >= 5000 && n < 5300);
      re <= !phase_fill && ($urandom_range(0, 1) == 0);
      if (n == 5299) begin
        checks++;
        if (!(wcount == 64 && lost_exp > 0 && n_lost == 16'(lost_exp))) begin
          failures++;
          $display("FAIL full: wcount=%0d lost=%0d exp=%0d", wcount, n_lost, lost_exp);
        end
      end
    end
    stop_writes = 1;
    re <= 1;
    repeat (400) begin
      @(posedge rclk);
      if (re && rvalid) begin
        checks++;
        lo = model.pop_front();
        hi = model.pop_front();
        if (rdata != {hi, lo}) begin failures++; $display("FAIL drain read"); end
      end
    end
    checks++;
    if (model.size() > 1) begin failures++; $display("FAIL not drained: %0d", model.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
