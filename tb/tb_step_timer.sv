// tb_step_timer - checks the step strobe period and its position after reset.
// A 7-clock step is used; every strobe must be exactly one clock wide and
// come 7 clocks after the previous one (the first 7 clocks after reset).
module tb_step_timer;
  localparam int P = 7;
  logic clk = 0, rst_n = 0, step;
  int checks = 0, failures = 0, cyc = 0, last = 0, nstrobe = 0;

  step_timer #(.STEP_CYCLES(P)) dut (.clk(clk), .rst_n(rst_n), .step(step));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);  // first edge with reset released
    cyc = 1;
    while (nstrobe < 20) begin
      @(negedge clk);
      if (step) begin
        checks++;
        if (cyc - last != P) begin
          failures++;
          $display("strobe %0d after %0d clocks, expected %0d", nstrobe, cyc - last, P);
        end
        last = cyc;
        nstrobe++;
      end
      @(posedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
