// tb_switch_loss - switching loss E_sw(I)*k(Rg)*Vdc*fsw with the refined and
// the first switching-energy tables, random currents and configurations,
// against the reference model; one clock latency.
module tb_switch_loss;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, ov2, ov1;
  pu_t i_pu = 0, vdc = 0, fsw = 0, rg = 0, p2, p1;
  int checks = 0, failures = 0, e2, e1;

  switch_loss #(.IMPROVED(1'b1)) dut2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .i_pu(i_pu), .vdc_pu(vdc), .fsw_pu(fsw), .rg_pu(rg), .p_sw(p2), .out_valid(ov2));
  switch_loss #(.IMPROVED(1'b0)) dut1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .i_pu(i_pu), .vdc_pu(vdc), .fsw_pu(fsw), .rg_pu(rg), .p_sw(p1), .out_valid(ov1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int i, input int v, input int f, input int r);
    @(negedge clk);
    i_pu = 16'(i); vdc = 16'(v); fsw = 16'(f); rg = 16'(r); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    e2 = p_sw(i, v, f, r, 1'b1);
    e1 = p_sw(i, v, f, r, 1'b0);
    checks += 2;
    if (!ov2 || int'(p2) != e2) begin
      failures++;
      $display("refined i=%0d v=%0d f=%0d r=%0d got %0d exp %0d", i, v, f, r, p2, e2);
    end
    if (!ov1 || int'(p1) != e1) begin
      failures++;
      $display("first i=%0d v=%0d f=%0d r=%0d got %0d exp %0d", i, v, f, r, p1, e1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 480 V, 10 kHz, 8 ohm at 31 A and 88 A
    one(11543, 30720, 20480, 8192);
    one(32768, 30720, 20480, 8192);
    one(65535, 65535, 65535, 65535);
    for (int n = 0; n < 3000; n++)
      one(int'($urandom_range(0, 65535)), int'($urandom_range(0, 65535)),
          int'($urandom_range(0, 65535)), int'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
