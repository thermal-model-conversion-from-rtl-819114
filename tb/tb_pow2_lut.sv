// tb_pow2_lut - exhaustive check of the interpolating look-up table for all
// 65536 inputs, with the default (refined switching energy) table and with the
// conduction-voltage table, against division-based interpolation of the
// tables entered in physical units. Also checks the reported segment.
module tb_pow2_lut;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  pu_t x = 0, y_e, y_v;
  logic [2:0] seg_e, seg_v;
  int checks = 0, failures = 0;
  int ex[], ey[], vx[], vy[];

  pow2_lut dut_e (.x(x), .y(y_e), .seg(seg_e));
  pow2_lut #(.N(VCE_N), .XS(VCE_X), .YS(VCE_Y)) dut_v (.x(x), .y(y_v), .seg(seg_v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    esw2_table(ex, ey);
    vce_table(vx, vy);
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      x = 16'(v);
      @(posedge clk);
      checks += 2;
      if (int'(y_e) != interp(ex, ey, v)) begin
        failures++;
        if (failures < 10) $display("esw x=%0d got %0d exp %0d", v, y_e, interp(ex, ey, v));
      end
      if (int'(y_v) != interp(vx, vy, v)) begin
        failures++;
        if (failures < 10) $display("vce x=%0d got %0d exp %0d", v, y_v, interp(vx, vy, v));
      end
      for (int k = 0; k < 4; k++)
        if (v >= ex[k] && v < ex[k+1]) begin
          checks++;
          if (int'(seg_e) != k) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
