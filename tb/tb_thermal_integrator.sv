// tb_thermal_integrator - discrete thermal stage y[n] = B*y[n-1] + A*x[n-1].
// Instance 1 has the default coefficients (R_pu = 0.2, tau = 100 steps): a
// power step and its removal are compared bit for bit with the recurrence and,
// within 1 % of the final value, with the continuous response
// R*x*(1 - exp(-t/tau)). Instance 2 (steady state 5 pu) must saturate.
// Updates only happen on en.
module tb_thermal_integrator;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned A = 33554, B = 16609444;   // 0.002, 0.99
  logic clk = 0, rst_n = 0, en = 0;
  pu_t x = 0;
  pui_t y, ys;
  int checks = 0, failures = 0;
  bit sat_seen = 0;
  longint r = 0, rs = 0;
  real cont, final_v, yr;

  thermal_integrator #(.A(A), .B(B)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));
  thermal_integrator #(.A(8388608), .B(15099494)) dut_s (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(ys));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic upd(input int n);
    @(negedge clk); en = 1;
    @(negedge clk); en = 0;
    r  = integ(r, longint'(A), longint'(B), int'(x));
    rs = integ(rs, 8388608, 15099494, int'(x));
    checks += 2;
    if (longint'(y) != r) begin
      failures++;
      if (failures < 10) $display("step %0d: got %0d exp %0d", n, y, r);
    end
    if (longint'(ys) != rs) failures++;
    if (ys == '1) sat_seen = 1;
    // no change without en
    @(negedge clk);
    checks++;
    if (longint'(y) != r) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    x = 16'd30000;
    final_v = 0.2 * 30000.0 / 65536.0;
    for (int n = 1; n <= 800; n++) begin
      upd(n);
      // y[n] responds to x from n-1 on: continuous response delayed one step
      cont = final_v * (1.0 - $exp(-real'(n - 1) / 100.0));
      yr = real'(y) / 16777216.0;
      checks++;
      if (yr - cont > 0.01 * final_v || cont - yr > 0.01 * final_v) begin
        failures++;
        $display("step %0d: %f vs continuous %f", n, yr, cont);
      end
    end
    x = 0;
    for (int n = 1; n <= 300; n++) upd(n);
    checks++;
    if (!sat_seen) begin failures++; $display("saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
