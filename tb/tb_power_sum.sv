// tb_power_sum - p_in = K_T * (p_con + K_SW * p_sw) against the reference
// with random losses (small, realistic and saturating); one clock latency.
module tb_power_sum;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, saturated;
  pu_t pc = 0, ps = 0, p_in;
  int checks = 0, failures = 0, e, nsat = 0;

  power_sum dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .p_con(pc),
                 .p_sw(ps), .p_in(p_in), .out_valid(out_valid), .saturated(saturated));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int c, input int s);
    @(negedge clk);
    pc = 16'(c); ps = 16'(s); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    e = tb_ref_pkg::p_in(c, s);
    checks++;
    if (!out_valid || int'(p_in) != e) begin
      failures++;
      $display("pcon=%0d psw=%0d got %0d exp %0d", c, s, p_in, e);
    end
    if (saturated) nsat++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 0); one(1830, 600); one(65535, 0); one(0, 65535); one(20000, 10000);
    for (int n = 0; n < 1000; n++) one(int'($urandom_range(0, 4000)), int'($urandom_range(0, 2000)));
    for (int n = 0; n < 1000; n++) one(int'($urandom_range(0, 65535)), int'($urandom_range(0, 65535)));
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
