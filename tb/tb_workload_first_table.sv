// tb_workload_first_table - the inverter operating points of the study run
// with the first, coarse switching-energy table (ESW_IMPROVED = 0) and an
// 8-clock model step. For each sinusoidal current (31 A at 50 Hz down to
// 3.1 A at 5 Hz; 10 kHz switching, 480 V, 8 ohm) the losses are averaged over
// one current period and compared with the losses the study reports for its
// fixed-point model with this table (tolerance 15 %). The coarse table
// overestimates the switching loss by up to about 37 % against the refined
// one; the test also checks that it does so at every operating point.
module tb_workload_first_table;
  import thermal_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_adc = 0, ths_adc = 16'sd2560;
  pu_t cfg_vdc = 16'd30720, cfg_fsw = 16'd20480, cfg_rg = 16'd8192;
  logic step, out_valid, i_clamped, p_saturated;
  pu_t i_pu, ths_pu, p_con, p_sw, p_in, dt, tj;

  thermal_model_top #(.STEP_CYCLES(8), .ESW_IMPROVED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .i_adc(i_adc), .ths_adc(ths_adc),
    .cfg_vdc(cfg_vdc), .cfg_fsw(cfg_fsw), .cfg_rg(cfg_rg),
    .step(step), .i_pu(i_pu), .ths_pu(ths_pu), .p_con(p_con), .p_sw(p_sw),
    .p_in(p_in), .dt(dt), .tj(tj), .out_valid(out_valid),
    .i_clamped(i_clamped), .p_saturated(p_saturated));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_step(input int code);
    @(negedge clk);
    i_adc = 16'(code);
    @(posedge out_valid);
    @(negedge clk);
  endtask

  function automatic void near(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (got > exp_v + tol || got < exp_v - tol) begin
      failures++;
      $display("FAIL %s: %f, expected %f +- %f", what, got, exp_v, tol);
    end
  endfunction

  real f_hz [6]  = '{50.0, 40.0, 30.0, 20.0, 10.0, 5.0};
  real amp_a [6] = '{31.0, 24.8, 18.6, 12.4, 6.2, 3.1};
  real psw_paper [6] = '{22.58, 18.03, 13.48, 8.93, 4.38, 2.1};
  real pcon_paper [6] = '{22.65, 16.21, 10.55, 5.91, 2.19, 0.57};
  real psw_refined [6] = '{17.91, 13.59, 9.99, 6.6, 3.21, 1.51};

  initial begin
    real sc, ss, pc_w, ps_w;
    int nper;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      nper = int'($rtoi(1.0 / (f_hz[w] * 100.0e-6) + 0.5));
      sc = 0; ss = 0;
      for (int n = 0; n < nper; n++) begin
        run_step(int'($rtoi($floor(amp_a[w] * $sin(2.0 * PI * f_hz[w] * real'(n) * 100.0e-6) * 128.0 + 0.5))));
        sc += real'(p_con);
        ss += real'(p_sw);
      end
      pc_w = sc / nper / 65536.0 * 2816.0;
      ps_w = ss / nper / 65536.0 * (0.064 * 2.0 * 1024.0 / 600.0 * 32000.0);
      $display("%4.0f Hz %5.1f A: P_sw %6.2f W (study %6.2f)  P_con %6.2f W (study %6.2f)",
               f_hz[w], amp_a[w], ps_w, psw_paper[w], pc_w, pcon_paper[w]);
      near($sformatf("P_sw %0.0f Hz", f_hz[w]), ps_w, psw_paper[w], 0.15 * psw_paper[w] + 0.05);
      // the conduction loss does not depend on the energy table; the study's
      // two runs differ here, so only a loose bound is applied
      near($sformatf("P_con %0.0f Hz", f_hz[w]), pc_w, pcon_paper[w], 0.35 * pcon_paper[w] + 0.05);
      checks++;
      if (ps_w <= psw_refined[w]) begin
        failures++;
        $display("FAIL first table does not overestimate at %0.0f Hz", f_hz[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
