// tb_pu_scale - per-unit scaling by K = 2.4824 (switching to conduction base)
// and K = 0.5: random and corner inputs, including saturation at 1 pu.
module tb_pu_scale;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  pu_t x = 0, y1, y2;
  logic s1, s2;
  int checks = 0, failures = 0, nsat = 0;

  pu_scale #(.K(40672), .FRAC(14)) dut1 (.x(x), .y(y1), .sat(s1));
  pu_scale #(.K(8192),  .FRAC(14)) dut2 (.x(x), .y(y2), .sat(s2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int v);
    @(negedge clk);
    x = 16'(v);
    @(posedge clk);
    checks += 3;
    if (int'(y1) != scale(v, k_sw())) begin
      failures++;
      $display("K_sw x=%0d got %0d exp %0d", v, y1, scale(v, k_sw()));
    end
    if (int'(y2) != v / 2 || s2) failures++;
    if (s1 != ((longint'(v) * 40672) / 16384 > 65535)) failures++;
    if (s1) nsat++;
  endtask

  initial begin
    one(0); one(1); one(26399); one(26400); one(65535);
    for (int n = 0; n < 5000; n++) one(int'($urandom_range(0, 65535)));
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
