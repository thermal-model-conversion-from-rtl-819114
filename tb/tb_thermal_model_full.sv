// tb_thermal_model_full - the estimator at its default size (100 us step of
// 5000 clocks, refined switching-energy table) running the inverter operating
// points of the fixed-point model study: a sinusoidal output current whose
// amplitude is proportional to its frequency (31 A at 50 Hz down to 3.1 A at
// 5 Hz), 10 kHz switching, 480 V blocking voltage, 8 ohm gate resistance.
//   1. For each operating point the conduction and switching losses are
//      averaged over one current period and compared with the losses the
//      study reports for its fixed-point model (tolerance 15 %, which covers
//      the table contents this design had to assume).
//   2. After a reset, a 31 A / 50 Hz current step is applied for 0.4 s and the
//      temperature rise is compared every 10 ms with a floating-point model
//      of the same thermal network (exact exponential step response of each
//      R-tau stage, losses from the same tables in physical units). The target
//      of the fixed-point conversion is 5 % agreement; 0.1 K is added for
//      the first, small values.
module tb_thermal_model_full;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  localparam real R [3] = '{0.05, 0.20, 0.20};
  localparam real T [3] = '{0.01, 0.10, 1.00};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_adc = 0, ths_adc = 16'sd2560;   // 40 degC
  pu_t cfg_vdc = 16'd30720, cfg_fsw = 16'd20480, cfg_rg = 16'd8192;
  logic step, out_valid, i_clamped, p_saturated;
  pu_t i_pu, ths_pu, p_con, p_sw, p_in, dt, tj;

  thermal_model_top dut (
    .clk(clk), .rst_n(rst_n), .i_adc(i_adc), .ths_adc(ths_adc),
    .cfg_vdc(cfg_vdc), .cfg_fsw(cfg_fsw), .cfg_rg(cfg_rg),
    .step(step), .i_pu(i_pu), .ths_pu(ths_pu), .p_con(p_con), .p_sw(p_sw),
    .p_in(p_in), .dt(dt), .tj(tj), .out_valid(out_valid),
    .i_clamped(i_clamped), .p_saturated(p_saturated));

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one model step with current code `code`; returns after its results
  task automatic run_step(input int code);
    @(negedge clk);
    i_adc = 16'(code);
    @(posedge out_valid);
    @(negedge clk);
  endtask

  function automatic int sine_code(input real amp, input real f, input int n);
    return int'($rtoi($floor(amp * $sin(2.0 * PI * f * real'(n) * 100.0e-6) * 128.0 + 0.5)));
  endfunction

  function automatic void near(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (got > exp_v + tol || got < exp_v - tol) begin
      failures++;
      $display("FAIL %s: %f, expected %f +- %f", what, got, exp_v, tol);
    end
  endfunction

  real f_hz [6]  = '{50.0, 40.0, 30.0, 20.0, 10.0, 5.0};
  real amp_a [6] = '{31.0, 24.8, 18.6, 12.4, 6.2, 3.1};
  real psw_paper [6] = '{17.91, 13.59, 9.99, 6.6, 3.21, 1.51};
  real pcon_paper [6] = '{22.52, 16.36, 10.91, 6.05, 1.65, 0.41};

  initial begin
    real sc, ss, pc_w, ps_w, cont, rise, p_w, prev;
    real fy [3];
    int nper, code;
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // step period at the default size
    @(posedge step); t0 = $time;
    @(posedge step);
    near("step period [us]", real'($time - t0) / 1000.0, 100.0, 0.001);

    for (int w = 0; w < 6; w++) begin
      nper = int'($rtoi(1.0 / (f_hz[w] * 100.0e-6) + 0.5));
      sc = 0; ss = 0;
      for (int n = 0; n < nper; n++) begin
        run_step(sine_code(amp_a[w], f_hz[w], n));
        sc += real'(p_con);
        ss += real'(p_sw);
      end
      pc_w = sc / nper / 65536.0 * 2816.0;
      ps_w = ss / nper / 65536.0 * (0.064 * 2.0 * 1024.0 / 600.0 * 32000.0);
      $display("%4.0f Hz %5.1f A: P_sw %6.2f W (study %6.2f)  P_con %6.2f W (study %6.2f)",
               f_hz[w], amp_a[w], ps_w, psw_paper[w], pc_w, pcon_paper[w]);
      near($sformatf("P_sw %0.0f Hz", f_hz[w]), ps_w, psw_paper[w], 0.15 * psw_paper[w] + 0.05);
      near($sformatf("P_con %0.0f Hz", f_hz[w]), pc_w, pcon_paper[w], 0.15 * pcon_paper[w] + 0.05);
    end

    // temperature rise for a 31 A / 50 Hz current step
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) fy[i] = 0.0;
    prev = 0.0;
    for (int n = 0; n < 4000; n++) begin
      code = sine_code(31.0, 50.0, n);
      run_step(code);
      // floating-point model: loss of this step acts from the next step on
      p_w = floss(real'(code) / 128.0, 480.0, 10000.0, 8.0, 1'b1);
      cont = 0;
      for (int i = 0; i < 3; i++) begin
        fy[i] = fy[i] * $exp(-100.0e-6 / T[i]) + R[i] * p_w * (1.0 - $exp(-100.0e-6 / T[i]));
        cont += fy[i];
      end
      if (n % 100 == 50) begin
        rise = real'(dt) / 65536.0 * 256.0;
        // dt of this step reflects the losses up to the previous step
        $display("t = %0.3f s: dT %6.2f K (floating point %6.2f K), Tj %6.2f degC",
                 real'(n + 1) * 100.0e-6, rise, prev, real'(tj) / 65536.0 * 256.0);
        near("dT", rise, prev, 0.05 * prev + 0.1);
        near("Tj - Ths", real'(tj) / 65536.0 * 256.0 - 40.0, rise, 0.01);
      end
      prev = cont;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
