// tb_delta_t_calc - third-order thermal network. A constant loss is applied
// for 20000 steps and then removed; each stage is compared bit for bit with
// the reference recurrence (coefficients derived here from R and tau), dt and
// tj with their quantized sum, and dt with the continuous response
// sum R_i*P*(1 - exp(-t/tau_i)) within 1 % of the final rise. dt and tj must
// appear two clocks after en.
module tb_delta_t_calc;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  localparam real R [3] = '{0.05, 0.20, 0.20};
  localparam real T [3] = '{0.01, 0.10, 1.00};
  logic clk = 0, rst_n = 0, en = 0, out_valid;
  pu_t p_in = 0, ths = 0, dt, tj;
  pui_t stage [3];
  int checks = 0, failures = 0;
  longint a [3], b [3], r [3];
  longint s;
  int edt, etj;
  real p_w, cont, rise;

  delta_t_calc dut (.clk(clk), .rst_n(rst_n), .en(en), .p_in(p_in), .ths_pu(ths),
                    .dt(dt), .tj(tj), .out_valid(out_valid), .stage(stage));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic upd(input int n);
    @(negedge clk); en = 1;
    @(negedge clk); en = 0;
    s = 0;
    for (int i = 0; i < 3; i++) begin
      r[i] = integ(r[i], a[i], b[i], int'(p_in));
      s += r[i];
      checks++;
      if (longint'(stage[i]) != r[i]) begin
        failures++;
        if (failures < 10) $display("step %0d stage %0d got %0d exp %0d", n, i, stage[i], r[i]);
      end
    end
    edt = (s > 16777215) ? 65535 : int'(s >> 8);
    etj = (edt + int'(ths) > 65535) ? 65535 : edt + int'(ths);
    checks++;
    if (out_valid) failures++;          // not yet
    @(negedge clk);
    checks++;
    if (!out_valid || int'(dt) != edt || int'(tj) != etj) begin
      failures++;
      if (failures < 10) $display("step %0d dt %0d exp %0d tj %0d exp %0d", n, dt, edt, tj, etj);
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin
      a[i] = ref_coef_a(R[i], T[i]);
      b[i] = ref_coef_b(T[i]);
      r[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    ths = 16'(to_pu(40.0, 256.0));
    p_in = 16'(to_pu(60.0, 1024.0));           // 60 W
    p_w = real'(p_in) / 65536.0 * 1024.0;
    for (int n = 1; n <= 20000; n++) begin
      upd(n);
      if (n % 50 == 0) begin
        cont = 0;
        for (int i = 0; i < 3; i++)
          cont += R[i] * p_w * (1.0 - $exp(-real'(n - 1) * 100.0e-6 / T[i]));
        rise = real'(dt) / 65536.0 * 256.0;
        checks++;
        if (rise - cont > 0.27 || cont - rise > 0.27) begin
          failures++;
          $display("step %0d: dT %f K vs continuous %f K", n, rise, cont);
        end
      end
    end
    p_in = 0;
    for (int n = 1; n <= 2000; n++) upd(n);
    $display("final dT %f K", real'(dt) / 65536.0 * 256.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
