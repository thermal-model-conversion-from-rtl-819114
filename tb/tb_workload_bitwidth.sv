// tb_workload_bitwidth - effect of the word widths on the temperature
// estimate. Four estimators with different (W, WI) run the same 31 A / 50 Hz
// current step for 0.4 s of model time (8-clock step):
//   (16, 24) the default, (12, 24) narrow datapath, (16, 16) narrow
//   integrators, (20, 28) wide everything.
// Each dT is compared every 10 ms (after the first 50 ms) with a floating-point
// model of the same tables and thermal network. Checks: the default stays
// within the 5 % target; narrowing the integrators to 16 bits makes the error
// clearly larger; widening everything gives no significant gain (the error
// falls by less than 1 percentage point).
module tb_workload_bitwidth;
  import tb_ref_pkg::*;
  localparam real R [3] = '{0.05, 0.20, 0.20};
  localparam real T [3] = '{0.01, 0.10, 1.00};
  localparam real PI = 3.14159265358979;
  localparam int NC = 4;
  localparam int WS [NC]  = '{16, 12, 16, 20};
  localparam int WIS [NC] = '{24, 24, 16, 28};

  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_adc = 0, ths_adc = 16'sd2560;
  logic             out_valid [NC];
  logic [31:0]      dt_any [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int W = WS[c];
    logic step, i_clamped, p_saturated;
    logic [W-1:0] i_pu, ths_pu, p_con, p_sw, p_in, dt, tj;
    // 480 V, 10 kHz, 8 ohm at width W
    localparam logic [W-1:0] VDC = W'((64'd30720 << W) >> 16);
    localparam logic [W-1:0] FSW = W'((64'd20480 << W) >> 16);
    localparam logic [W-1:0] RG  = W'((64'd8192 << W) >> 16);
    thermal_model_top #(.STEP_CYCLES(8), .W(W), .WI(WIS[c])) dut (
      .clk(clk), .rst_n(rst_n), .i_adc(i_adc), .ths_adc(ths_adc),
      .cfg_vdc(VDC), .cfg_fsw(FSW), .cfg_rg(RG),
      .step(step), .i_pu(i_pu), .ths_pu(ths_pu), .p_con(p_con), .p_sw(p_sw),
      .p_in(p_in), .dt(dt), .tj(tj), .out_valid(out_valid[c]),
      .i_clamped(i_clamped), .p_saturated(p_saturated));
    assign dt_any[c] = 32'(dt);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fy [3];
    real cont, prev, p_w, rise, err;
    real max_err [NC];
    int code;
    for (int i = 0; i < 3; i++) fy[i] = 0.0;
    for (int c = 0; c < NC; c++) max_err[c] = 0.0;
    prev = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      code = int'($rtoi($floor(31.0 * $sin(2.0 * PI * 50.0 * real'(n) * 100.0e-6) * 128.0 + 0.5)));
      @(negedge clk);
      i_adc = 16'(code);
      @(posedge out_valid[0]);
      @(negedge clk);
      p_w = floss(real'(code) / 128.0, 480.0, 10000.0, 8.0, 1'b1);
      cont = 0;
      for (int i = 0; i < 3; i++) begin
        fy[i] = fy[i] * $exp(-100.0e-6 / T[i]) + R[i] * p_w * (1.0 - $exp(-100.0e-6 / T[i]));
        cont += fy[i];
      end
      if (n >= 500 && n % 100 == 50)
        for (int c = 0; c < NC; c++) begin
          rise = real'(dt_any[c]) / (2.0 ** WS[c]) * 256.0;
          err = (rise - prev) / prev;
          if (err < 0) err = -err;
          if (err > max_err[c]) max_err[c] = err;
        end
      prev = cont;
    end
    for (int c = 0; c < NC; c++)
      $display("W=%0d WI=%0d: largest dT error against floating point %5.2f %%",
               WS[c], WIS[c], 100.0 * max_err[c]);
    checks++;
    if (max_err[0] > 0.05) begin failures++; $display("FAIL default misses 5 %%"); end
    checks++;
    if (max_err[2] < 2.0 * max_err[0] + 0.01) begin
      failures++; $display("FAIL 16-bit integrators not clearly worse");
    end
    checks++;
    if (max_err[0] - max_err[3] > 0.01) begin
      failures++; $display("FAIL wider words gave a significant gain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
