// tb_thermal_model_top - end-to-end test of the thermal estimator with an
// 8-clock model step. Two instances run side by side, one with the refined and
// one with the first switching-energy table. Every model step the testbench
// predicts, from its own reference model, the sampled inputs, both losses,
// the scaled total, the three thermal stages, dT and Tj, and compares them
// when out_valid rises, which must be 5 clocks after the step strobe.
// Stimulus: one period of a 31 A / 50 Hz sine (negative half clamped to 0 by
// the A/D-block), a 250 A over-range current with maximum configuration
// (power saturation), and a slow current ramp across every table segment.
// Each mechanism is counted and must occur at least once.
module tb_thermal_model_top;
  import thermal_pkg::*;
  import tb_ref_pkg::*;
  localparam int SC = 8;
  localparam real R [3] = '{0.05, 0.20, 0.20};
  localparam real T [3] = '{0.01, 0.10, 1.00};

  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_adc = 0, ths_adc = 0;
  pu_t cfg_vdc = 0, cfg_fsw = 0, cfg_rg = 0;
  logic step [2], out_valid [2], i_clamped [2], p_saturated [2];
  pu_t i_pu [2], ths_pu [2], p_con [2], p_sw [2], p_in [2], dt [2], tj [2];

  thermal_model_top #(.STEP_CYCLES(SC), .ESW_IMPROVED(1'b1)) dut2 (
    .clk(clk), .rst_n(rst_n), .i_adc(i_adc), .ths_adc(ths_adc),
    .cfg_vdc(cfg_vdc), .cfg_fsw(cfg_fsw), .cfg_rg(cfg_rg),
    .step(step[1]), .i_pu(i_pu[1]), .ths_pu(ths_pu[1]), .p_con(p_con[1]),
    .p_sw(p_sw[1]), .p_in(p_in[1]), .dt(dt[1]), .tj(tj[1]),
    .out_valid(out_valid[1]), .i_clamped(i_clamped[1]), .p_saturated(p_saturated[1]));
  thermal_model_top #(.STEP_CYCLES(SC), .ESW_IMPROVED(1'b0)) dut1 (
    .clk(clk), .rst_n(rst_n), .i_adc(i_adc), .ths_adc(ths_adc),
    .cfg_vdc(cfg_vdc), .cfg_fsw(cfg_fsw), .cfg_rg(cfg_rg),
    .step(step[0]), .i_pu(i_pu[0]), .ths_pu(ths_pu[0]), .p_con(p_con[0]),
    .p_sw(p_sw[0]), .p_in(p_in[0]), .dt(dt[0]), .tj(tj[0]),
    .out_valid(out_valid[0]), .i_clamped(i_clamped[0]), .p_saturated(p_saturated[0]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint a [3], b [3], st [2][3];
  int n_steps = 0, n_neg = 0, n_over = 0, n_sat = 0, n_first = 0, n_lat = 0;
  int esw_seg [4], vce_seg [6], esw1_seg [2];
  int cyc = 0, step_cyc = 0;
  int ex[], ey[], vx[], vy[], e1x[], e1y[];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // latency from step strobe to out_valid
  always @(posedge clk) begin
    if (step[1]) step_cyc <= cyc;
    if (out_valid[1]) begin
      checks++;
      n_lat++;
      if (cyc - step_cyc != 5) begin
        failures++;
        $display("latency %0d clocks, expected 5", cyc - step_cyc);
      end
    end
  end

  function automatic void chk(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("step %0d %s: got %0d expected %0d", n_steps, what, got, exp_v);
    end
  endfunction

  // apply inputs for one model step and check the result it produces
  task automatic run_step(input int code, input int ths_code, input int v, input int f, input int r);
    int ipu, tpu, pc, ps, pin, s, edt, etj;
    bit imp;
    @(negedge clk);
    i_adc = 16'(code); ths_adc = 16'(ths_code);
    cfg_vdc = 16'(v); cfg_fsw = 16'(f); cfg_rg = 16'(r);
    @(posedge out_valid[1]);
    @(negedge clk);
    n_steps++;
    ipu = ad(code, 47663);
    tpu = ad(ths_code, 65536);
    if (code < 0) n_neg++;
    if (ipu == 65535) n_over++;
    for (int k = 0; k < 4; k++) if (ipu >= ex[k] && ipu < ex[k+1]) esw_seg[k]++;
    for (int k = 0; k < 6; k++) if (ipu >= vx[k] && ipu < vx[k+1]) vce_seg[k]++;
    for (int k = 0; k < 2; k++) if (ipu >= e1x[k] && ipu < e1x[k+1]) esw1_seg[k]++;
    for (int d = 0; d < 2; d++) begin
      imp = (d == 1);
      pc  = tb_ref_pkg::p_con(ipu);
      ps  = tb_ref_pkg::p_sw(ipu, v, f, r, imp);
      pin = tb_ref_pkg::p_in(pc, ps);
      s = 0;
      for (int i = 0; i < 3; i++) begin
        st[d][i] = integ(st[d][i], a[i], b[i], pin);
        s += int'(st[d][i]);
      end
      edt = (s > 16777215) ? 65535 : s >> 8;
      etj = (edt + tpu > 65535) ? 65535 : edt + tpu;
      chk("i_pu", int'(i_pu[d]), ipu);
      chk("ths_pu", int'(ths_pu[d]), tpu);
      chk("i_clamped", int'(i_clamped[d]), int'(code < 0 || ipu == 65535));
      chk("p_con", int'(p_con[d]), pc);
      chk("p_sw", int'(p_sw[d]), ps);
      chk("p_in", int'(p_in[d]), pin);
      chk("dt", int'(dt[d]), edt);
      chk("tj", int'(tj[d]), etj);
      if (p_saturated[d]) n_sat++;
    end
    if (p_sw[0] != p_sw[1]) n_first++;
  endtask

  function automatic void need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else
      $display("%-28s %0d", what, n);
  endfunction

  initial begin
    esw2_table(ex, ey);
    vce_table(vx, vy);
    esw1_table(e1x, e1y);
    for (int i = 0; i < 3; i++) begin
      a[i] = ref_coef_a(R[i], T[i]);
      b[i] = ref_coef_b(T[i]);
      st[0][i] = 0; st[1][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 480 V, 10 kHz, 8 ohm; 40 degC heatsink; 31 A 50 Hz sine, one period
    for (int n = 0; n < 200; n++)
      run_step(int'($rtoi($floor(31.0 * $sin(2.0 * 3.14159265358979 * 50.0 * real'(n) * 100.0e-6) * 128.0 + 0.5))),
               2560, 30720, 20480, 8192);
    // over-range current with maximum configuration
    for (int n = 0; n < 20; n++) run_step(32000, 2560, 65535, 65535, 65535);
    // slow ramp 0..175 A, varying heatsink temperature and gate resistance
    for (int n = 0; n < 176; n++)
      run_step(n * 128, 1280 + 32 * n, 30720, 20480, (n * 372) & 32'hFFFF);
    need("model steps", n_steps);
    need("out_valid latency checks", n_lat);
    need("negative current clamped", n_neg);
    need("over-range current clamped", n_over);
    need("power saturation", n_sat);
    need("first vs refined E_sw table", n_first);
    foreach (esw_seg[k]) need($sformatf("E_sw refined segment %0d", k), esw_seg[k]);
    foreach (esw1_seg[k]) need($sformatf("E_sw first segment %0d", k), esw1_seg[k]);
    foreach (vce_seg[k]) need($sformatf("V_ce segment %0d", k), vce_seg[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
